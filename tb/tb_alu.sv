// tb_alu: self-checking test of the 32-bit ALU.
// Applies directed corner cases and random operand pairs for each of the
// five operation codes (AND, OR, ADD, SUB, SLT) and compares Output, Carry out
// and Zero with a reference computed here from plain arithmetic: 33-bit sums
// for the carry, A + ~B + 1 for subtraction, bit 31 of A - B for slt.
module tb_alu;
  import mips_pkg::*;

  logic [31:0] a, b, y;
  logic [2:0]  f;
  logic        cout, zero;
  int checks = 0, failures = 0;

  alu #(.W(32)) dut (.a(a), .b(b), .f(f), .y(y), .carry_out(cout), .zero(zero));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_op(input logic [31:0] ta, input logic [31:0] tb_, input alu_op_e op);
    logic [32:0] s;
    logic [31:0] ey;
    logic        ec;
    a = ta; b = tb_; f = op;
    #1;
    unique case (op)
      ALU_AND: begin ey = ta & tb_; s = {1'b0, ta} + {1'b0, tb_}; ec = s[32]; end
      ALU_OR:  begin ey = ta | tb_; s = {1'b0, ta} + {1'b0, tb_}; ec = s[32]; end
      ALU_ADD: begin s = {1'b0, ta} + {1'b0, tb_}; ey = s[31:0]; ec = s[32]; end
      ALU_SUB: begin s = {1'b0, ta} + {1'b0, ~tb_} + 33'd1; ey = ta - tb_; ec = s[32]; end
      default: begin s = {1'b0, ta} + {1'b0, ~tb_} + 33'd1; ey = {31'd0, s[31]}; ec = s[32]; end
    endcase
    checks++;
    if (y !== ey || cout !== ec || zero !== (ey == 32'd0)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h (exp %h) cout=%b (exp %b) zero=%b",
               op.name(), ta, tb_, y, ey, cout, ec, zero);
    end
  endtask

  initial begin
    alu_op_e ops [5] = '{ALU_AND, ALU_OR, ALU_ADD, ALU_SUB, ALU_SLT};
    // directed cases
    check_op(32'd5, 32'd3, ALU_SUB);
    check_op(32'd3, 32'd3, ALU_SUB);          // zero result
    check_op(32'd3, 32'd5, ALU_SLT);          // 1
    check_op(32'd5, 32'd3, ALU_SLT);          // 0
    check_op(32'hFFFF_FFFB, 32'd3, ALU_SLT);  // -5 < 3
    check_op(32'hFFFF_FFFF, 32'd1, ALU_ADD);  // carry out, zero
    check_op(32'hF0F0_F0F0, 32'h0FF0_0FF0, ALU_AND);
    check_op(32'hF0F0_F0F0, 32'h0FF0_0FF0, ALU_OR);
    // random cases
    for (int i = 0; i < 2000; i++) begin
      check_op($urandom, $urandom, ops[i % 5]);
      check_op($urandom_range(0, 20), $urandom_range(0, 20), ops[i % 5]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
