// data_mem: data memory, 256 bytes, separate from the instruction memory.
//
// The address is the 8-bit d field of LD/ST (IR[7:0]). Reads are
// asynchronous: MBus = mem[addr] during the execute cycle of LD and the
// register file stores it at the end of that cycle. ST writes wdata (ABus,
// register Ra) at addr on the rising clock edge while dm_wen_n (DMwEn) is low.
// Initial content: bytes 0..3 hold 0x85, 0x94, 0x51, 0xFC (the values the
// published sample programs load), all others 0x00; INIT_FILE, a $readmemh
// file, overrides this.
module data_mem #(
  parameter int unsigned AW        = 8,
  parameter int unsigned DW        = 8,
  parameter string       INIT_FILE = ""
) (
  input  logic          clk,
  input  logic          dm_wen_n,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
    mem[0] = DW'(8'h85);
    mem[1] = DW'(8'h94);
    mem[2] = DW'(8'h51);
    mem[3] = DW'(8'hFC);
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (!dm_wen_n) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];
endmodule
