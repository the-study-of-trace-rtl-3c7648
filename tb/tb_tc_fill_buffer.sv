// tb_tc_fill_buffer: checks the fill buffer against tc_ref_pkg's queue model.
//
// Random pairs of gathered instructions (plain, conditional branch,
// delimiter; 0, 1 or 2 per cycle) are driven, with bursts of delimiter
// pairs so that rows close faster than they drain. Every cycle the
// presented row (rd_*) must equal the model's oldest finished trace, the
// overflow flag must match the model's drops, and the rule events must
// match the model's counts. A short directed prologue checks the two
// two-instruction cases of rule 1 and rule 3 with known traces.
module tb_tc_fill_buffer;
  import tc_pkg::word_t;
  import tc_pkg::waddr_t;
  import tc_ref_pkg::tc_model;
  import tc_ref_pkg::trace_c;
  import tc_ref_pkg::op_class;

  localparam int ROWS = 4, SLOTS = 4, NCYC = 4000;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [1:0] g_valid, g_branch, g_delim;
  word_t      g_instr [2];
  waddr_t     g_addr  [2];
  logic       rd_valid, rd_br_exist, overflow;
  logic [2:0] rd_size;
  logic [1:0] rd_br_pos;
  word_t      rd_instr [SLOTS];
  waddr_t     rd_addr  [SLOTS];
  logic [1:0] ev_rule1, ev_rule2, ev_rule3;

  tc_fill_buffer #(.ROWS(ROWS), .SLOTS(SLOTS)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  tc_model m;
  int unsigned addr_ctr = 100;
  int d1 = 0, d2 = 0, d3 = 0, n_ovf = 0, n_full = 0;

  function automatic word_t mk(int c);
    case (c)
      1: return {6'h05, 26'($urandom)};   // BNEZ
      2: return {6'h02, 26'($urandom)};   // J
      default: return {6'h23, 26'($urandom)};  // LW (plain)
    endcase
  endfunction

  // drive n instructions of the given classes, check this cycle, step
  task automatic cycle(int n, int c0, int c1);
    word_t  ins [2];
    waddr_t adr [2];
    trace_c f;
    ins[0] = mk(c0); ins[1] = mk(c1);
    adr[0] = waddr_t'(addr_ctr); adr[1] = waddr_t'(addr_ctr + 1);
    addr_ctr += 2;
    g_valid  = (n == 2) ? 2'b11 : (n == 1) ? 2'b01 : 2'b00;
    g_instr  = ins;
    g_addr   = adr;
    g_branch = {n == 2 && c1 == 1, n >= 1 && c0 == 1};
    g_delim  = {n == 2 && c1 == 2, n >= 1 && c0 == 2};
    #1;
    // presented row == model's oldest finished trace
    f = m.front();
    check(rd_valid == (f != null), "rd_valid");
    if (f != null && rd_valid) begin
      check(int'(rd_size) == f.instr.size(), "rd_size");
      check(rd_br_exist == (f.br_pos >= 0), "rd_br_exist");
      if (f.br_pos >= 0) check(int'(rd_br_pos) == f.br_pos, "rd_br_pos");
      for (int s = 0; s < f.instr.size(); s++) begin
        check(rd_instr[s] == f.instr[s], "rd_instr");
        check(rd_addr[s] == f.addr[s], "rd_addr");
      end
      if (f.instr.size() == SLOTS) n_full++;
    end
    begin
      automatic int ovf0 = m.n_overflow;
      automatic int r1 = m.n_rule1, r2 = m.n_rule2, r3 = m.n_rule3;
      m.fill(n, ins, adr);
      check(overflow == (m.n_overflow > ovf0), "overflow");
      check($countones(ev_rule1) == m.n_rule1 - r1, "rule1 event");
      check($countones(ev_rule2) == m.n_rule2 - r2, "rule2 event");
      check($countones(ev_rule3) == m.n_rule3 - r3, "rule3 event");
      if (overflow) n_ovf++;
    end
    @(posedge clk);
    #1;
  endtask

  function automatic int rnd_class();
    int r = $urandom_range(0, 99);
    return (r < 15) ? 1 : (r < 27) ? 2 : 0;
  endfunction

  initial begin
    m = new(ROWS, SLOTS, 0);
    g_valid = 0; g_branch = 0; g_delim = 0;
    g_instr = '{default: '0}; g_addr = '{default: '0};
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // directed: case 2 (two plain, two plain -> one full row)
    cycle(2, 0, 0); cycle(2, 0, 0);
    // case 1: three plain, then two -> first fills, second starts next row
    cycle(2, 0, 0); cycle(1, 0, 0); cycle(2, 0, 0);
    // rule 3 inside one pair: branch, branch
    cycle(2, 1, 1);
    // rule 2: plain, jump
    cycle(2, 0, 2);
    cycle(0, 0, 0); cycle(0, 0, 0); cycle(0, 0, 0); cycle(0, 0, 0);
    check(m.n_rule1 == 2 && m.n_rule3 == 1 && m.n_rule2 == 1, "directed rule counts");
    // random traffic with delimiter bursts
    for (int i = 0; i < NCYC; i++) begin
      if ((i / 50) % 4 == 3) cycle(2, 2, 2);
      else begin
        automatic int r = $urandom_range(0, 9);
        cycle(r < 6 ? 2 : (r < 9 ? 1 : 0), rnd_class(), rnd_class());
      end
    end
    check(m.n_rule1 > 0 && m.n_rule2 > 0 && m.n_rule3 > 0, "all rules seen");
    check(n_ovf > 0, "overflow seen");
    check(n_full > 0, "full rows seen");
    $display("rules %0d/%0d/%0d overflow %0d", m.n_rule1, m.n_rule2, m.n_rule3, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * (NCYC + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
