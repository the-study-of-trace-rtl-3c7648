// tb_tc_gather: random stage-register contents and dispatch strobes. One
// cycle later the outputs must hold exactly the accepted instructions, the
// older (A) first, with their addresses and classes; an instruction not
// accepted must not appear.
module tb_tc_gather;
  import tc_pkg::word_t;
  import tc_pkg::waddr_t;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic       a_valid, b_valid, a_dispatch, b_dispatch;
  word_t      a_instr, b_instr;
  waddr_t     a_addr, b_addr;
  logic [1:0] g_valid, g_branch, g_delim;
  word_t      g_instr [2];
  waddr_t     g_addr  [2];

  tc_gather dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic word_t rnd_instr();
    logic [5:0] ops [4] = '{6'h04, 6'h13, 6'h08, 6'h00};
    return {ops[$urandom_range(0, 3)], 26'($urandom)};
  endfunction

  initial begin
    int n_both = 0, n_one_b = 0;
    a_valid = 0; b_valid = 0; a_dispatch = 0; b_dispatch = 0;
    a_instr = 0; b_instr = 0; a_addr = 0; b_addr = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 2000; i++) begin
      automatic word_t  ei [$];
      automatic waddr_t ea [$];
      a_valid = $urandom_range(0, 3) != 0; b_valid = $urandom_range(0, 3) != 0;
      a_dispatch = $urandom_range(0, 1); b_dispatch = $urandom_range(0, 1);
      a_instr = rnd_instr(); b_instr = rnd_instr();
      a_addr = waddr_t'($urandom); b_addr = waddr_t'($urandom);
      if (a_valid && a_dispatch) begin ei.push_back(a_instr); ea.push_back(a_addr); end
      if (b_valid && b_dispatch) begin ei.push_back(b_instr); ea.push_back(b_addr); end
      if (ei.size() == 2) n_both++;
      if (ei.size() == 1 && !(a_valid && a_dispatch)) n_one_b++;
      @(posedge clk); #1;
      check(g_valid == (ei.size() == 2 ? 2'b11 : ei.size() == 1 ? 2'b01 : 2'b00), "g_valid");
      for (int k = 0; k < ei.size(); k++) begin
        check(g_instr[k] == ei[k] && g_addr[k] == ea[k], "g_instr/g_addr");
        check(g_branch[k] == (ei[k][31:26] == 6'h04), "g_branch");
        check(g_delim[k] == (ei[k][31:26] == 6'h13), "g_delim");
      end
    end
    check(n_both > 0 && n_one_b > 0, "both packing cases seen");
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
