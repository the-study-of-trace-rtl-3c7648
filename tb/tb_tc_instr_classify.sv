// tb_tc_instr_classify: every 6-bit opcode, with random low bits, against a
// table of the DLX conditional branches (BEQZ 0x04, BNEZ 0x05) and trace
// delimiters (J 0x02, JAL 0x03, RFE 0x10, TRAP 0x11, JR 0x12, JALR 0x13).
module tb_tc_instr_classify;
  logic [31:0] instr;
  logic        is_branch, is_delim;

  tc_instr_classify dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int op = 0; op < 64; op++) begin
      for (int rep = 0; rep < 8; rep++) begin
        automatic bit exp_br = (op == 4 || op == 5);
        automatic bit exp_dl = (op == 2 || op == 3 || op == 16 || op == 17 ||
                                op == 18 || op == 19);
        instr = {6'(op), 26'($urandom)};
        #1;
        checks++;
        if (is_branch != exp_br || is_delim != exp_dl) begin
          failures++;
          $display("FAIL opcode %0h: branch %0b delim %0b", op, is_branch, is_delim);
        end
      end
    end
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
