// io_display: board outputs of the core, an 8-bit LED port and two
// seven-segment digits.
//
// out_port is a register that copies value (register R15 of the register
// file) on every rising clock edge; reset clears it. hex0 and hex1 show its
// low and high nibble as hexadecimal digits 0-F on active-low seven-segment
// displays, segment order {g,f,e,d,c,b,a} (bit 0 = segment a). The port names
// and widths follow the core's top level; what drives them (R15, a one-cycle
// register stage) and the active-low segment coding are this design's choice.
module io_display (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] value,
  output logic [7:0] out_port,
  output logic [6:0] hex0,
  output logic [6:0] hex1
);
  function automatic logic [6:0] seg7(input logic [3:0] d);
    logic [6:0] on;  // active-high pattern {g,f,e,d,c,b,a}
    unique case (d)
      4'h0: on = 7'b0111111;
      4'h1: on = 7'b0000110;
      4'h2: on = 7'b1011011;
      4'h3: on = 7'b1001111;
      4'h4: on = 7'b1100110;
      4'h5: on = 7'b1101101;
      4'h6: on = 7'b1111101;
      4'h7: on = 7'b0000111;
      4'h8: on = 7'b1111111;
      4'h9: on = 7'b1101111;
      4'hA: on = 7'b1110111;
      4'hB: on = 7'b1111100;
      4'hC: on = 7'b0111001;
      4'hD: on = 7'b1011110;
      4'hE: on = 7'b1111001;
      default: on = 7'b1110001;  // F
    endcase
    return ~on;
  endfunction

  always_ff @(posedge clk or posedge rst) begin
    if (rst) out_port <= '0;
    else     out_port <= value;
  end

  assign hex0 = seg7(out_port[3:0]);
  assign hex1 = seg7(out_port[7:4]);
endmodule
