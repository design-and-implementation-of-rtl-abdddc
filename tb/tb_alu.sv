// tb_alu: exhaustive-by-sampling test of the ALU.
// Drives every function code with directed and random operands and compares
// result and flags {N,Z,V,C} with values computed here from the instruction
// definitions, including the flag values seen in the published sample runs.
module tb_alu;
  import risc_pkg::*;
  alu_op_e    f;
  logic [7:0] a, b, y;
  flags_t     fl;
  int checks = 0, failures = 0;

  alu dut (.f, .a, .b, .y, .flags(fl));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_y(input alu_op_e op, input logic [7:0] x, input logic [7:0] z,
                          input logic [7:0] ey, input logic [3:0] efl);
    f = op; a = x; b = z;
    #1;
    checks++;
    if (y !== ey || fl !== efl) begin
      failures++;
      $display("FAIL f=%0d a=%h b=%h y=%h/%h flags=%b/%b", op, x, z, y, ey, fl, efl);
    end
  endtask

  function automatic logic [3:0] ref_fl(input alu_op_e op, input logic [7:0] x,
                                        input logic [7:0] z, output logic [7:0] r);
    logic [8:0] s;
    logic c, v;
    c = 0; v = 0;
    case (op)
      ALU_ADD: begin s = x + z; r = s[7:0]; c = s[8];
                     v = (x[7] & z[7] & ~r[7]) | (~x[7] & ~z[7] & r[7]); end
      ALU_SUB: begin r = x - z; c = (x >= z); end
      ALU_AND: r = x & z;
      ALU_OR:  r = x | z;
      ALU_XOR: r = x ^ z;
      ALU_ROL: r = (x << 1) | (x >> 7);
      ALU_ROR: r = (x >> 1) | (x << 7);
      default: r = z;
    endcase
    return {r[7], r == 0, v, c};
  endfunction

  initial begin
    logic [7:0] r;
    logic [3:0] e;
    // published sample values
    expect_y(ALU_ADD, 8'h85, 8'hFC, 8'h81, 4'b1001);
    expect_y(ALU_SUB, 8'h85, 8'h51, 8'h34, 4'b0001);
    expect_y(ALU_SUB, 8'h85, 8'hFF, 8'h86, 4'b1000);
    expect_y(ALU_ADD, 8'h13, 8'hA7, 8'hBA, 4'b1000);
    expect_y(ALU_AND, 8'h13, 8'hA7, 8'h03, 4'b0000);
    expect_y(ALU_OR,  8'h13, 8'hA7, 8'hB7, 4'b1000);
    expect_y(ALU_XOR, 8'h13, 8'hA7, 8'hB4, 4'b1000);
    expect_y(ALU_ROR, 8'h51, 8'h00, 8'hA8, 4'b1000);
    expect_y(ALU_ROL, 8'h94, 8'h00, 8'h29, 4'b0000);
    // zero, overflow, borrow corners
    expect_y(ALU_SUB, 8'h05, 8'h05, 8'h00, 4'b0101);
    expect_y(ALU_ADD, 8'h7F, 8'h01, 8'h80, 4'b1010);
    expect_y(ALU_ADD, 8'hFF, 8'h01, 8'h00, 4'b0101);
    for (int i = 0; i < 4000; i++) begin
      alu_op_e op;
      logic [7:0] x, z;
      op = alu_op_e'($urandom_range(0, 7));
      x = 8'($urandom); z = 8'($urandom);
      e = ref_fl(op, x, z, r);
      expect_y(op, x, z, r, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
