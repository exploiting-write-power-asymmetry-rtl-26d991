// tb_addr_map: for each of the four mapping schemes, sets a single address bit
// at a time and checks which field and field bit it lands in, using the field
// order of the scheme (most significant first) and the field widths
// rank 1, bank 3, row 15, column 7. Random addresses are checked too.
module tb_addr_map;
  import wpas_pkg::*;
  int checks = 0, failures = 0;
  laddr_t addr;
  maddr_t ma [4];

  addr_map #(.SCHEME(1)) m1 (.addr, .ma(ma[0]));
  addr_map #(.SCHEME(2)) m2 (.addr, .ma(ma[1]));
  addr_map #(.SCHEME(3)) m3 (.addr, .ma(ma[2]));
  addr_map #(.SCHEME(4)) m4 (.addr, .ma(ma[3]));

  // field codes: 0 rank, 1 bank, 2 row, 3 col; listed least significant first
  int order [4][4] = '{'{1, 3, 2, 0}, '{0, 1, 3, 2}, '{1, 0, 3, 2}, '{3, 1, 0, 2}};
  int width [4] = '{1, 3, 15, 7};

  function automatic maddr_t ref_map(int s, laddr_t a);
    maddr_t m = '0;
    int pos = 0;
    for (int f = 0; f < 4; f++) begin
      int fld = order[s][f];
      for (int b = 0; b < width[fld]; b++) begin
        case (fld)
          0: m.rank[b] = a[pos];
          1: m.bank[b] = a[pos];
          2: m.row[b]  = a[pos];
          default: m.col[b] = a[pos];
        endcase
        pos++;
      end
    end
    return m;
  endfunction

  initial begin
    for (int k = 0; k < LADDR_W + 300; k++) begin
      addr = (k < LADDR_W) ? (laddr_t'(1) << k) : laddr_t'($urandom);
      #1;
      for (int s = 0; s < 4; s++) begin
        checks++;
        if (ma[s] != ref_map(s, addr)) begin
          failures++;
          $display("FAIL scheme %0d addr %h", s + 1, addr);
        end
      end
    end
    // the main scheme puts the lowest address bit in the rank
    addr = laddr_t'(1); #1;
    checks++;
    if (ma[1].rank != 1'b1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
