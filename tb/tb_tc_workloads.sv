// tb_tc_workloads: small DLX programs run through several trace cache
// configurations.
//
// The programs are the kinds of workload the trace cache was evaluated
// with: a bubble sort on ascending, random and descending data (bs-a, bs-r,
// bs-d), a prime-number sieve up to 20, 50 and 100 (pn-20, pn-50, pn-100)
// a permutation generator (all orders of 5 elements, Heap's method) and an
// integer 8-point DCT applied to the 8 rows of an 8x8 block (dct).
// The code is written here for this test; it is assembled by the functions
// below into standard DLX encodings and executed by a small instruction-set
// model (integer subset: ADD SUB SGT SLT ADDI SUBI ANDI SLLI SRAI SGTI LW SW
// BEQZ BNEZ J TRAP, plus a signed multiply, which this test encodes in the
// arithmetic format with opcode 0x01, function 0x0E). A program ends at its
// TRAP; its result is checked.
//
// The executed instruction stream feeds a fetch/dispatch model: the two
// oldest unexecuted instructions sit in fetch registers A and B, and the
// dispatcher takes two, one (A) or none of them per cycle. Each time the
// fetch head changes the PC load is signalled. Four lanes (tc_workload_lane)
// see the same stream: 4-instruction lines with 4 and 64 lines, and
// 8-instruction lines with 4 and 64 lines. Each lane checks every access
// against its reference model and prints hit rates, miss kinds and space
// usage per program. The caches are reset between programs.
module tb_tc_workloads;
  import tc_ref_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic   a_valid, b_valid, a_dispatch, b_dispatch, pc_write, ic_hit;
  word_t  a_instr, b_instr;
  waddr_t a_addr, b_addr, pc;

  int ck [4], fl [4];
  tc_workload_lane #(.SLOTS(4), .LINES(4))  l0 (.*, .checks(ck[0]), .failures(fl[0]));
  tc_workload_lane #(.SLOTS(4), .LINES(64)) l1 (.*, .checks(ck[1]), .failures(fl[1]));
  tc_workload_lane #(.SLOTS(8), .LINES(4))  l2 (.*, .checks(ck[2]), .failures(fl[2]));
  tc_workload_lane #(.SLOTS(8), .LINES(64)) l3 (.*, .checks(ck[3]), .failures(fl[3]));

  int checks = 0, failures = 0;
  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endfunction

  // ------------------------------------------------------------ assembler
  localparam int unsigned BASE = 256;     // word address of the first instruction
  localparam int unsigned DATA = 32'h4000; // byte address of the data area

  word_t prog [$];
  int    lab [string];
  int    pass;

  function automatic void emit(word_t w); prog.push_back(w); endfunction
  function automatic void label(string s); lab[s] = prog.size(); endfunction
  function automatic int off(string s);   // byte offset from the next instruction
    return (pass == 0 || !lab.exists(s)) ? 0 : (lab[s] - (prog.size() + 1)) * 4;
  endfunction
  function automatic void i_op(int op, int rd, int rs1, int imm);
    emit({6'(op), 5'(rs1), 5'(rd), 16'(imm)});
  endfunction
  function automatic void r_op(int fn, int rd, int rs1, int rs2);
    emit({6'h00, 5'(rs1), 5'(rs2), 5'(rd), 5'h00, 6'(fn)});
  endfunction
  function automatic void addi(int rd, int rs, int imm); i_op(8'h08, rd, rs, imm); endfunction
  function automatic void subi(int rd, int rs, int imm); i_op(8'h0A, rd, rs, imm); endfunction
  function automatic void andi(int rd, int rs, int imm); i_op(8'h0C, rd, rs, imm); endfunction
  function automatic void slli(int rd, int rs, int imm); i_op(8'h14, rd, rs, imm); endfunction
  function automatic void sgti(int rd, int rs, int imm); i_op(8'h1B, rd, rs, imm); endfunction
  function automatic void srai(int rd, int rs, int imm); i_op(8'h17, rd, rs, imm); endfunction
  function automatic void mult(int rd, int a, int b);
    emit({6'h01, 5'(a), 5'(b), 5'(rd), 5'h00, 6'h0E});
  endfunction
  function automatic void lw(int rd, int imm, int rs);   i_op(8'h23, rd, rs, imm); endfunction
  function automatic void sw(int imm, int rs, int rd);   i_op(8'h2B, rd, rs, imm); endfunction
  function automatic void add(int rd, int a, int b); r_op(8'h20, rd, a, b); endfunction
  function automatic void sub(int rd, int a, int b); r_op(8'h22, rd, a, b); endfunction
  function automatic void slt(int rd, int a, int b); r_op(8'h2A, rd, a, b); endfunction
  function automatic void sgt(int rd, int a, int b); r_op(8'h2B, rd, a, b); endfunction
  function automatic void beqz(int rs, string t); i_op(8'h04, 0, rs, off(t)); endfunction
  function automatic void bnez(int rs, string t); i_op(8'h05, 0, rs, off(t)); endfunction
  function automatic void j(string t); emit({6'h02, 26'(off(t))}); endfunction
  function automatic void trap(); emit({6'h11, 26'd0}); endfunction

  // bubble sort of n words at DATA
  function automatic void p_bubble(int n);
    addi(1, 0, n - 1);                    // r1 = passes left
    label("outer");
    addi(2, 0, 0);                        // r2 = byte offset
    addi(3, 1, 0);                        // r3 = compares left
    label("inner");
    lw(4, DATA, 2); lw(5, DATA + 4, 2);
    sgt(6, 4, 5);
    beqz(6, "noswap");
    sw(DATA, 2, 5); sw(DATA + 4, 2, 4);
    label("noswap");
    addi(2, 2, 4);
    subi(3, 3, 1);
    bnez(3, "inner");
    subi(1, 1, 1);
    bnez(1, "outer");
    trap();
  endfunction

  // sieve: word DATA+4*k becomes 1 for every composite k <= n
  function automatic void p_sieve(int n);
    addi(1, 0, 2);                        // r1 = i
    label("outer");
    slli(2, 1, 2);
    lw(3, DATA, 2);
    bnez(3, "next");                      // already known composite
    add(4, 1, 1);                         // r4 = multiple
    label("mark");
    sgti(5, 4, n);
    bnez(5, "next");
    slli(6, 4, 2);
    addi(7, 0, 1);
    sw(DATA, 6, 7);
    add(4, 4, 1);
    j("mark");
    label("next");
    addi(1, 1, 1);
    sgti(5, 1, n);
    beqz(5, "outer");
    trap();
  endfunction

  // Heap's method, iterative, on n words at DATA; counter words at DATA+64.
  // r9 counts swaps (n!-1 at the end).
  function automatic void p_permute(int n);
    addi(1, 0, 0);                        // r1 = i
    addi(9, 0, 0);
    label("loop");
    sgti(2, 1, n - 1);
    bnez(2, "done");
    slli(3, 1, 2);                        // r3 = 4i
    lw(4, DATA + 64, 3);                  // r4 = c[i]
    slt(5, 4, 1);
    beqz(5, "reset");
    andi(6, 1, 1);                        // odd i: swap a[c[i]], else a[0]
    addi(7, 0, 0);
    beqz(6, "even");
    slli(7, 4, 2);
    label("even");
    lw(10, DATA, 7); lw(11, DATA, 3);
    sw(DATA, 7, 11); sw(DATA, 3, 10);
    addi(9, 9, 1);
    addi(4, 4, 1);
    sw(DATA + 64, 3, 4);
    addi(1, 0, 0);
    j("loop");
    label("reset");
    sw(DATA + 64, 3, 0);
    addi(1, 1, 1);
    j("loop");
    label("done");
    trap();
  endfunction

  // 8-point DCT of each row of an 8x8 block at DATA, coefficients
  // (8x8 words, row u) at DATA+0x400, results at DATA+0x800
  function automatic void p_dct();
    addi(1, 0, 0);                        // r1 = row * 32
    label("row");
    addi(2, 0, 0);                        // r2 = u * 4
    label("u");
    addi(3, 0, 0);                        // r3 = x * 4
    addi(8, 0, 0);                        // r8 = sum
    slli(12, 2, 3);                       // r12 = u * 32
    label("x");
    add(4, 1, 3);
    lw(5, DATA, 4);
    add(6, 12, 3);
    lw(7, DATA + 'h400, 6);
    mult(9, 5, 7);
    add(8, 8, 9);
    addi(3, 3, 4);
    sgti(10, 3, 28);
    beqz(10, "x");
    srai(8, 8, 8);
    add(11, 1, 2);
    sw(DATA + 'h800, 11, 8);
    addi(2, 2, 4);
    sgti(10, 2, 28);
    beqz(10, "u");
    addi(1, 1, 32);
    sgti(10, 1, 224);
    beqz(10, "row");
    trap();
  endfunction

  function automatic void build(int kind, int n);
    for (pass = 0; pass < 2; pass++) begin
      prog.delete();
      if (pass == 0) lab.delete();
      case (kind)
        0: p_bubble(n);
        1: p_sieve(n);
        2: p_permute(n);
        default: p_dct();
      endcase
    end
  endfunction

  // ------------------------------------------------ instruction-set model
  int unsigned r [32];
  int unsigned dmem [int unsigned];
  bit halted;

  function automatic int unsigned ld(int unsigned a);
    return dmem.exists(a) ? dmem[a] : 0;
  endfunction

  // execute the instruction at word address a, return the next one
  function automatic int unsigned exec(int unsigned a);
    word_t i;
    int unsigned s1, s2, imm, nxt, v;
    int rd, bo, jo;
    i = prog[a - BASE];
    s1 = r[i[25:21]];
    s2 = r[i[20:16]];
    imm = {{16{i[15]}}, i[15:0]};
    nxt = a + 1;
    rd = -1;
    v = 0;
    bo = $signed(imm) >>> 2;                          // branch offset, words
    jo = $signed({{6{i[25]}}, i[25:0]}) >>> 2;        // jump offset, words
    case (i[31:26])
      6'h00: begin
        rd = i[15:11];
        case (i[5:0])
          6'h20: v = s1 + s2;
          6'h22: v = s1 - s2;
          6'h2A: v = ($signed(s1) < $signed(s2)) ? 1 : 0;
          6'h2B: v = ($signed(s1) > $signed(s2)) ? 1 : 0;
          default: $display("FAIL bad function %h", i[5:0]);
        endcase
      end
      6'h08: begin rd = i[20:16]; v = s1 + imm; end
      6'h0A: begin rd = i[20:16]; v = s1 - imm; end
      6'h0C: begin rd = i[20:16]; v = s1 & imm; end
      6'h14: begin rd = i[20:16]; v = s1 << imm[4:0]; end
      6'h1B: begin rd = i[20:16]; v = ($signed(s1) > $signed(imm)) ? 1 : 0; end
      6'h17: begin rd = i[20:16]; v = $signed(s1) >>> imm[4:0]; end
      6'h01: begin
        rd = i[15:11];
        if (i[5:0] == 6'h0E) v = $signed(s1) * $signed(s2);
        else $display("FAIL bad function %h", i[5:0]);
      end
      6'h23: begin rd = i[20:16]; v = ld(s1 + imm); end
      6'h2B: dmem[s1 + imm] = s2;
      6'h04: if (s1 == 0) nxt = a + 1 + bo;
      6'h05: if (s1 != 0) nxt = a + 1 + bo;
      6'h02: nxt = a + 1 + jo;
      6'h11: halted = 1;
      default: $display("FAIL bad opcode %h", i[31:26]);
    endcase
    if (rd > 0) r[rd] = v;
    return nxt;
  endfunction

  // ------------------------------------------------ fetch / dispatch model
  int unsigned stream [$];
  int unsigned walk_pc;
  function automatic void refill();
    while (stream.size() < 4 && !halted) begin
      stream.push_back(walk_pc);
      walk_pc = exec(walk_pc);
    end
  endfunction

  bit          icv [8];
  int unsigned ict [8];
  function automatic bit ic_access(int unsigned a);
    int unsigned idx = (a >> 1) % 8, tg = a >> 4;
    bit h = icv[idx] && ict[idx] == tg;
    icv[idx] = 1; ict[idx] = tg;
    return h;
  endfunction

  task automatic run(string name, int kind, int n);
    automatic bit new_head = 1;
    automatic int cyc = 0;
    build(kind, n);
    foreach (r[k]) r[k] = 0;
    foreach (icv[k]) icv[k] = 0;
    halted = 0; walk_pc = BASE; stream.delete();
    a_valid = 0; b_valid = 0; a_dispatch = 0; b_dispatch = 0; pc_write = 0;
    rst = 1; repeat (2) @(posedge clk); #1 rst = 0;
    refill();
    while (stream.size() > 0) begin
      automatic int nd;
      automatic int rr = $urandom_range(0, 99);
      a_valid = 1; a_addr = waddr_t'(stream[0]); a_instr = prog[stream[0] - BASE];
      b_valid = stream.size() > 1;
      b_addr = waddr_t'(b_valid ? stream[1] : 0);
      b_instr = b_valid ? prog[stream[1] - BASE] : '0;
      nd = (rr < 60) ? 2 : (rr < 85) ? 1 : 0;
      if (!b_valid && nd == 2) nd = 1;
      a_dispatch = nd >= 1; b_dispatch = nd == 2;
      pc_write = new_head; pc = a_addr;
      ic_hit = new_head ? ic_access(stream[0]) : 1'b0;
      @(posedge clk); #1;
      new_head = nd > 0;
      for (int k = 0; k < nd; k++) void'(stream.pop_front());
      refill();
      cyc++;
    end
    a_valid = 0; b_valid = 0; a_dispatch = 0; b_dispatch = 0; pc_write = 0;
    repeat (ROWS_DRAIN) @(posedge clk);
    #1;
    l0.report(name); l1.report(name); l2.report(name); l3.report(name);
  endtask
  localparam int ROWS_DRAIN = 8;

  int unsigned data [$];
  task automatic load_data(int mode, int n);
    data.delete();
    dmem.delete();
    for (int k = 0; k < n; k++) begin
      automatic int unsigned v = (mode == 0) ? k + 1 : (mode == 2) ? n - k : $urandom_range(1, 999);
      data.push_back(v);
      dmem[DATA + 4 * k] = v;
    end
  endtask

  initial begin
    a_instr = 0; b_instr = 0; a_addr = 0; b_addr = 0; pc = 0; ic_hit = 0;
    a_valid = 0; b_valid = 0; a_dispatch = 0; b_dispatch = 0; pc_write = 0;
    // bubble sort
    foreach (data[k]) ;
    for (int mode = 0; mode < 3; mode++) begin
      automatic string nm = (mode == 0) ? "bs-a" : (mode == 1) ? "bs-r" : "bs-d";
      load_data(mode, 16);
      run(nm, 0, 16);
      data.sort();
      for (int k = 0; k < 16; k++) check(ld(DATA + 4 * k) == data[k], {nm, " sorted"});
    end
    // prime numbers
    foreach (data[k]) ;
    for (int p = 0; p < 3; p++) begin
      automatic int n = (p == 0) ? 20 : (p == 1) ? 50 : 100;
      automatic int cnt = 0;
      dmem.delete();
      run($sformatf("pn-%0d", n), 1, n);
      for (int k = 2; k <= n; k++) begin
        automatic bit prime = 1;
        for (int d = 2; d * d <= k; d++) if (k % d == 0) prime = 0;
        check((ld(DATA + 4 * k) == 0) == prime, $sformatf("pn-%0d flag %0d", n, k));
        cnt += int'(prime);
      end
      $display("pn-%0d: %0d primes", n, cnt);
    end
    // permutation
    load_data(0, 5);
    run("permute", 2, 5);
    check(r[9] == 119, "permute: 5!-1 swaps");
    // DCT: coefficients round(128 * c(u) * cos((2x+1) u pi / 16))
    dmem.delete();
    begin
      automatic int coef [8][8];
      automatic int pix [8][8];
      for (int u = 0; u < 8; u++)
        for (int x = 0; x < 8; x++) begin
          automatic real cu = (u == 0) ? 0.70710678 : 1.0;
          coef[u][x] = int'($floor(128.0 * cu * $cos((2 * x + 1) * u * 3.14159265 / 16.0) + 0.5));
          dmem[DATA + 'h400 + 32 * u + 4 * x] = coef[u][x];
        end
      for (int y = 0; y < 8; y++)
        for (int x = 0; x < 8; x++) begin
          pix[y][x] = $urandom_range(0, 255);
          dmem[DATA + 32 * y + 4 * x] = pix[y][x];
        end
      run("dct", 3, 0);
      for (int y = 0; y < 8; y++)
        for (int u = 0; u < 8; u++) begin
          automatic int sum = 0;
          for (int x = 0; x < 8; x++) sum += pix[y][x] * coef[u][x];
          check(int'(ld(DATA + 'h800 + 32 * y + 4 * u)) == (sum >>> 8), "dct result");
        end
    end
    for (int k = 0; k < 4; k++) begin
      checks += ck[k];
      failures += fl[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
