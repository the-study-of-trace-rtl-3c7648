// tb_tc_transfer: random ready rows against random stored line information.
// Expected values are worked out here from the transfer rules: write when
// the trace has 2+ instructions and the line is empty, starts elsewhere, or
// is not longer; Tag_2 is the address after an inner branch, else Tag_1;
// overwrite when a valid line's contents change; line index = low address
// bits. 4 lines, 4 slots.
module tb_tc_transfer;
  import tc_pkg::waddr_t;

  localparam int LINES = 4, SLOTS = 4;

  logic       rd_valid, rd_br_exist, line_valid;
  logic [2:0] rd_size;
  logic [1:0] rd_br_pos, line_size_m1, sel_idx, wr_idx, wr_size_m1, wr_br_pos;
  waddr_t     rd_addr [SLOTS];
  waddr_t     line_tag1, line_tag2, wr_tag1, wr_tag2;
  logic       wr_en, wr_br_exist, ev_write, ev_overwrite, ev_drop_short, ev_drop_keep;

  tc_transfer #(.LINES(LINES), .SLOTS(SLOTS)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int n_w = 0, n_ow = 0, n_ds = 0, n_dk = 0;
    for (int i = 0; i < 5000; i++) begin
      automatic int sz = $urandom_range(1, 4);
      automatic int bp = $urandom_range(0, sz - 1);
      automatic bit br = $urandom_range(0, 1);
      automatic int lsz = $urandom_range(2, 4);
      automatic waddr_t first = waddr_t'($urandom_range(0, 40));
      automatic waddr_t dest = waddr_t'($urandom_range(0, 40));
      automatic bit exp_w, inner;
      automatic waddr_t exp_t2;
      rd_valid = $urandom_range(0, 7) != 0;
      rd_size = 3'(sz); rd_br_exist = br; rd_br_pos = 2'(bp);
      for (int s = 0; s < SLOTS; s++)
        rd_addr[s] = (br && s > bp) ? dest + waddr_t'(s - bp - 1) : first + waddr_t'(s);
      line_valid = $urandom_range(0, 3) != 0;
      line_tag1 = $urandom_range(0, 1) ? first : waddr_t'($urandom_range(0, 40));
      line_tag2 = $urandom_range(0, 1) ? line_tag1 : dest;
      line_size_m1 = 2'(lsz - 1);
      #1;
      inner = br && bp < sz - 1;
      exp_t2 = inner ? dest : first;
      exp_w = rd_valid && sz > 1 && (!line_valid || line_tag1 != first || sz >= lsz);
      check(sel_idx == 2'(first), "sel_idx");
      check(wr_en == exp_w && ev_write == exp_w, "wr_en");
      check(ev_drop_short == (rd_valid && sz == 1), "drop_short");
      check(ev_drop_keep == (rd_valid && sz > 1 && !exp_w), "drop_keep");
      if (exp_w) begin
        check(wr_idx == 2'(first), "wr_idx");
        check(wr_tag1 == first, "wr_tag1");
        check(wr_tag2 == exp_t2, "wr_tag2");
        check(int'(wr_size_m1) == sz - 1, "wr_size_m1");
        check(wr_br_exist == br && (!br || int'(wr_br_pos) == bp), "wr_br");
        check(ev_overwrite == (line_valid && (line_tag1 != first || lsz != sz ||
                                              line_tag2 != exp_t2)), "ev_overwrite");
        n_w++;
        if (ev_overwrite) n_ow++;
      end else check(!ev_overwrite, "no overwrite without write");
      if (ev_drop_short) n_ds++;
      if (ev_drop_keep) n_dk++;
    end
    check(n_w > 0 && n_ow > 0 && n_ds > 0 && n_dk > 0, "all outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
