// tb_tc_stats: the statistics counters against shadow counts kept in this
// testbench. Random access outcomes (one-hot, or idle), random transfer
// events with random line numbers and trace sizes, drops and overflows are
// applied; after every cycle all totals, the per-line values of a random
// line and the space-usage sum (sum of the longest trace per line) are
// compared with the shadow values. A reset in the middle must clear
// everything.
module tb_tc_stats;
  localparam int LINES = 8, SLOTS = 4, W = 32;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic       acc_valid, ic_hit, first_tag_hit, content_hit, comp_miss, conf_miss;
  logic [2:0] acc_line, hit_line, wr_line, line_sel;
  logic       ev_write, ev_overwrite, ev_drop, ev_overflow;
  logic [2:0] wr_size;
  logic [W-1:0] n_access, n_ic_hit, n_ftag_hit, n_cont_hit, n_comp_miss, n_conf_miss,
                n_write, n_overwrite, n_drop, n_overflow;
  logic [5:0] space_used;
  logic [W-1:0] l_comp_miss, l_conf_miss, l_write, l_overwrite, l_ftag_hit, l_cont_hit;
  logic [2:0] l_longest;

  tc_stats #(.LINES(LINES), .SLOTS(SLOTS), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // shadow counts: index 0..9 totals, per line arrays
  int t_acc, t_ic, t_ftag, t_cont, t_comp, t_conf, t_wr, t_owr, t_drop, t_ovf;
  int p_comp [LINES], p_conf [LINES], p_wr [LINES], p_owr [LINES];
  int p_long [LINES], p_ftag [LINES], p_cont [LINES];

  task automatic clear_shadow();
    t_acc = 0; t_ic = 0; t_ftag = 0; t_cont = 0; t_comp = 0; t_conf = 0;
    t_wr = 0; t_owr = 0; t_drop = 0; t_ovf = 0;
    for (int l = 0; l < LINES; l++) begin
      p_comp[l] = 0; p_conf[l] = 0; p_wr[l] = 0; p_owr[l] = 0;
      p_long[l] = 0; p_ftag[l] = 0; p_cont[l] = 0;
    end
  endtask

  task automatic compare();
    int sum = 0;
    check(n_access == W'(t_acc) && n_ic_hit == W'(t_ic), "n_access / n_ic_hit");
    check(n_ftag_hit == W'(t_ftag) && n_cont_hit == W'(t_cont), "hit totals");
    check(n_comp_miss == W'(t_comp) && n_conf_miss == W'(t_conf), "miss totals");
    check(n_write == W'(t_wr) && n_overwrite == W'(t_owr), "write totals");
    check(n_drop == W'(t_drop) && n_overflow == W'(t_ovf), "drop / overflow totals");
    for (int l = 0; l < LINES; l++) sum += p_long[l];
    check(int'(space_used) == sum, "space_used");
    line_sel = 3'($urandom_range(0, LINES - 1));
    #1;
    check(l_comp_miss == W'(p_comp[line_sel]) && l_conf_miss == W'(p_conf[line_sel]),
          "per-line misses");
    check(l_write == W'(p_wr[line_sel]) && l_overwrite == W'(p_owr[line_sel]),
          "per-line writes");
    check(l_ftag_hit == W'(p_ftag[line_sel]) && l_cont_hit == W'(p_cont[line_sel]),
          "per-line hits");
    check(int'(l_longest) == p_long[line_sel], "per-line longest");
  endtask

  initial begin
    int max_seen = 0;
    {acc_valid, ic_hit, first_tag_hit, content_hit, comp_miss, conf_miss} = '0;
    {acc_line, hit_line, wr_line, line_sel, wr_size} = '0;
    {ev_write, ev_overwrite, ev_drop, ev_overflow} = '0;
    clear_shadow();
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 5000; i++) begin
      automatic int o = $urandom_range(0, 3);
      if (i == 2500) begin
        rst = 1; @(posedge clk); #1 rst = 0;
        clear_shadow();
        compare();
      end
      acc_valid = $urandom_range(0, 4) != 0;
      ic_hit = $urandom_range(0, 1);
      {first_tag_hit, content_hit, comp_miss, conf_miss} = acc_valid ? 4'(1 << o) : 4'b0;
      acc_line = 3'($urandom); hit_line = 3'($urandom);
      ev_write = $urandom_range(0, 2) == 0;
      ev_overwrite = ev_write && $urandom_range(0, 1);
      wr_line = 3'($urandom);
      wr_size = 3'($urandom_range(2, SLOTS));
      ev_drop = !ev_write && $urandom_range(0, 1);
      ev_overflow = $urandom_range(0, 9) == 0;
      // shadow
      if (acc_valid) begin
        t_acc++;
        if (ic_hit) t_ic++;
        if (first_tag_hit) begin t_ftag++; p_ftag[acc_line]++; end
        if (content_hit) begin t_cont++; p_cont[hit_line]++; end
        if (comp_miss) begin t_comp++; p_comp[acc_line]++; end
        if (conf_miss) begin t_conf++; p_conf[acc_line]++; end
      end
      if (ev_write) begin
        t_wr++; p_wr[wr_line]++;
        if (int'(wr_size) > p_long[wr_line]) p_long[wr_line] = int'(wr_size);
      end
      if (ev_overwrite) begin t_owr++; p_owr[wr_line]++; end
      if (ev_drop) t_drop++;
      if (ev_overflow) t_ovf++;
      @(posedge clk); #1;
      compare();
      if (int'(space_used) > max_seen) max_seen = int'(space_used);
    end
    check(max_seen == LINES * SLOTS, "space usage reaches full");
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
