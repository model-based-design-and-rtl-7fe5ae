// tb_qam4_ldpc_pkg -- checks the code tables of qam4_ldpc_pkg: every row of the expanded
// parity-check matrix against the eight syndrome equations of the code (S1 = Y3+Y8+Y9, ...),
// the generator against a hand-entered copy of G = [I8 P^T], and, for all 256 messages,
// that ldpc_encode gives m x G and that every codeword has a zero syndrome.
module tb_qam4_ldpc_pkg;
  import qam4_ldpc_pkg::*;
  int checks = 0, failures = 0;

  // Bits of each parity check, 1-based.
  int eq [8][3] = '{'{3, 8, 9}, '{4, 5, 10}, '{1, 6, 11}, '{2, 7, 12},
                    '{2, 5, 13}, '{3, 6, 14}, '{4, 7, 15}, '{1, 8, 16}};
  // Rows of G, column 1 in the most significant bit.
  logic [15:0] grow [8] = '{16'b1000000000100001, 16'b0100000000011000, 16'b0010000010000100,
                            16'b0001000001000010, 16'b0000100001001000, 16'b0000010000100100,
                            16'b0000001000010010, 16'b0000000110000001};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int r = 0; r < 8; r++) begin
      logic [1:16] ref_row;
      ref_row = '0;
      for (int t = 0; t < 3; t++) ref_row[eq[r][t]] = 1'b1;
      check(H[r+1] == ref_row, $sformatf("H row %0d = %b", r + 1, H[r+1]));
    end
    for (int m = 0; m < 256; m++) begin
      logic [15:0] x;
      logic [1:8]  mv;
      cw_t         cw;
      mv = 8'(m);
      x  = '0;
      for (int r = 0; r < 8; r++) if (mv[r+1]) x ^= grow[r];
      cw = ldpc_encode(mv);
      check(cw == x, $sformatf("encode %b -> %b, want %b", mv, cw, x));
      check(ldpc_syndrome(cw) == '0, $sformatf("syndrome of codeword %b", cw));
      // A single flipped bit Yj sets exactly the checks that contain j.
      for (int j = 1; j <= 16; j++) begin
        cw_t  y;
        syn_t s, want;
        y = cw;
        y[j] = ~y[j];
        want = '0;
        for (int r = 0; r < 8; r++)
          for (int t = 0; t < 3; t++) if (eq[r][t] == j) want[r+1] = 1'b1;
        s = ldpc_syndrome(y);
        if (m < 4) check(s == want, $sformatf("syndrome of error at Y%0d", j));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
