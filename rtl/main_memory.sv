// main_memory: main memory of the processor module and its two address registers.
//
// What it does: a byte-wide memory addressed by a higher and a lower address register. Both
// registers load from the B bus; the lower one can also be cleared. Data is written from the B
// bus and read onto the Y bus.
//
// How it works: at the rising edge, lha loads the higher register, lla loads the lower one and
// cla clears it (cla wins over lla), and we writes B bus data at the current address (the
// address before any register change in the same cycle). The read is combinational from the
// current address; the top puts it on the Y bus when the micro-instruction's RD bit is set.
//
// Parameters: HI_W and LO_W are the widths of the two registers (up to 8 each, 16 address
// bits); the memory has 2^(HI_W+LO_W) bytes.
//
// From the document: the register arrangement, the B bus / Y bus connections, up to 16 address
// bits. This design's choices: the memory is a plain synchronous-write, asynchronous-read array
// (the document leaves size and access to the application); the registers have no reset.
module main_memory #(
  parameter int unsigned HI_W = 8,
  parameter int unsigned LO_W = 8
) (
  input  logic                 clk,
  input  logic [7:0]           bbus,
  input  logic                 lha,
  input  logic                 lla,
  input  logic                 cla,
  input  logic                 we,
  output logic [7:0]           rdata,
  output logic [HI_W+LO_W-1:0] addr
);

  logic [HI_W-1:0] hi;
  logic [LO_W-1:0] lo;
  logic [7:0]      mem [2**(HI_W+LO_W)];

  assign addr  = {hi, lo};
  assign rdata = mem[addr];

  always_ff @(posedge clk) begin
    if (lha)      hi <= bbus[HI_W-1:0];
    if (cla)      lo <= '0;
    else if (lla) lo <= bbus[LO_W-1:0];
    if (we)       mem[addr] <= bbus;
  end

endmodule
