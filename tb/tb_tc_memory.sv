// tb_tc_memory: random writes to an 8-line, 4-slot memory, mirrored in a
// shadow array here; every cycle the three read ports are read at random
// lines and compared with the shadow, including the rule that a read shows
// the contents before the same cycle's write. Reset must clear all valids.
module tb_tc_memory;
  import tc_pkg::word_t;
  import tc_pkg::waddr_t;

  localparam int LINES = 8, SLOTS = 4;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic       wr_en, wr_br_exist;
  logic [2:0] wr_idx, lk_idx, hl_idx, sel_idx;
  waddr_t     wr_tag1, wr_tag2, lk_tag1, hl_tag1, hl_tag2, sel_tag1, sel_tag2;
  logic [1:0] wr_size_m1, wr_br_pos, hl_size_m1, hl_br_pos, sel_size_m1;
  word_t      wr_instr [SLOTS], lk_instr [SLOTS], hl_instr [SLOTS];
  logic       lk_valid, hl_valid, hl_br_exist, sel_valid;

  tc_memory #(.LINES(LINES), .SLOTS(SLOTS)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  bit     v  [LINES];
  waddr_t t1 [LINES], t2 [LINES];
  int     sz [LINES], bp [LINES];
  bit     be [LINES];
  word_t  ins [LINES][SLOTS];

  initial begin
    wr_en = 0; wr_idx = 0; wr_tag1 = 0; wr_tag2 = 0; wr_size_m1 = 0;
    wr_br_exist = 0; wr_br_pos = 0; wr_instr = '{default: '0};
    lk_idx = 0; hl_idx = 0; sel_idx = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int l = 0; l < LINES; l++) begin
      lk_idx = 3'(l); #1; check(!lk_valid, "valid cleared by reset");
    end
    for (int i = 0; i < 3000; i++) begin
      wr_en = $urandom_range(0, 2) == 0;
      wr_idx = 3'($urandom); wr_tag1 = waddr_t'($urandom); wr_tag2 = waddr_t'($urandom);
      wr_size_m1 = 2'($urandom); wr_br_exist = $urandom_range(0, 1); wr_br_pos = 2'($urandom);
      for (int s = 0; s < SLOTS; s++) wr_instr[s] = $urandom;
      lk_idx = 3'($urandom); hl_idx = 3'($urandom);
      sel_idx = (i % 3 == 0) ? wr_idx : 3'($urandom);
      #1;
      check(lk_valid == v[lk_idx], "lk_valid");
      if (v[lk_idx]) begin
        check(lk_tag1 == t1[lk_idx], "lk_tag1");
        for (int s = 0; s < SLOTS; s++) check(lk_instr[s] == ins[lk_idx][s], "lk_instr");
      end
      check(hl_valid == v[hl_idx], "hl_valid");
      if (v[hl_idx]) begin
        check(hl_tag1 == t1[hl_idx] && hl_tag2 == t2[hl_idx], "hl_tags");
        check(int'(hl_size_m1) == sz[hl_idx] && hl_br_exist == be[hl_idx] &&
              int'(hl_br_pos) == bp[hl_idx], "hl_info");
        for (int s = 0; s < SLOTS; s++) check(hl_instr[s] == ins[hl_idx][s], "hl_instr");
      end
      check(sel_valid == v[sel_idx], "sel_valid");
      if (v[sel_idx])
        check(sel_tag1 == t1[sel_idx] && sel_tag2 == t2[sel_idx] &&
              int'(sel_size_m1) == sz[sel_idx], "sel_info");
      if (wr_en) begin
        v[wr_idx] = 1; t1[wr_idx] = wr_tag1; t2[wr_idx] = wr_tag2;
        sz[wr_idx] = int'(wr_size_m1); be[wr_idx] = wr_br_exist; bp[wr_idx] = int'(wr_br_pos);
        for (int s = 0; s < SLOTS; s++) ins[wr_idx][s] = wr_instr[s];
      end
      @(posedge clk); #1;
    end
    wr_en = 0; rst = 1; @(posedge clk); #1 rst = 0;
    for (int l = 0; l < LINES; l++) begin
      lk_idx = 3'(l); #1; check(!lk_valid, "valid cleared by second reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
