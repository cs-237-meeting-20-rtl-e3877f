// tb_control: self-checking test of the instruction decoder.
// Checks the full control bundle for lw, sw, beq and the five R-type
// functions against a table written here, and checks that every other
// opcode and function code decodes to a no-op (no register write, no
// memory write, no branch).
module tb_control;
  import mips_pkg::*;
  logic [5:0] opcode, funct;
  ctrl_t      ctl;
  int checks = 0, failures = 0;

  control dut (.opcode(opcode), .funct(funct), .ctl(ctl));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected {reg_write, reg_dst_rd, alu_src_imm, alu_op, mem_write, mem_to_reg, branch}
  task automatic expect_ctl(input logic [5:0] o, input logic [5:0] fn, input logic [8:0] e);
    opcode = o; funct = fn;
    #1;
    checks++;
    if (ctl !== ctrl_t'(e)) begin
      failures++; $display("FAIL op=%h funct=%h ctl=%b exp %b", o, fn, ctl, e);
    end
  endtask

  initial begin
    logic known;
    expect_ctl(6'h23, 6'h3F, 9'b1_0_1_010_0_1_0);   // lw
    expect_ctl(6'h2B, 6'h00, 9'b0_0_1_010_1_0_0);   // sw
    expect_ctl(6'h04, 6'h20, 9'b0_0_0_110_0_0_1);   // beq
    expect_ctl(6'h00, 6'h20, 9'b1_1_0_010_0_0_0);   // add
    expect_ctl(6'h00, 6'h22, 9'b1_1_0_110_0_0_0);   // sub
    expect_ctl(6'h00, 6'h24, 9'b1_1_0_000_0_0_0);   // and
    expect_ctl(6'h00, 6'h25, 9'b1_1_0_001_0_0_0);   // or
    expect_ctl(6'h00, 6'h2A, 9'b1_1_0_111_0_0_0);   // slt
    for (int o = 0; o < 64; o++) begin
      for (int fn = 0; fn < 64; fn++) begin
        known = (o == 6'h23 || o == 6'h2B || o == 6'h04) ||
                (o == 0 && (fn == 6'h20 || fn == 6'h22 || fn == 6'h24 || fn == 6'h25 || fn == 6'h2A));
        if (!known) begin
          opcode = 6'(o); funct = 6'(fn);
          #1;
          checks++;
          if (ctl.reg_write || ctl.mem_write || ctl.branch) begin
            failures++; $display("FAIL op=%h funct=%h not a no-op", o, fn);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
