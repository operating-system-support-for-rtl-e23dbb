// dp_ram - the dual-port interface memory shared by coprocessor and processor.
//
// WORDS words of DATA_W bits with two independent synchronous ports. Port A
// is the PLD side, driven by the IMU (DP_ADDR, DP_DIN, DP_DOUT, DP_EN,
// DP_WR); port B is the processor side, which in the described system sits
// behind the AHB bus and is used by the operating system to copy pages in and
// out. Each port reads or writes one word per cycle when its enable is high;
// read data appear on the port's output after the clock edge that sampled the
// address and stay there until the next enabled read. A write does not
// change the port's read output. The two ports are never used on the same
// word at the same time (processor and coprocessor take turns); if they are,
// the port B write lands last.
//
// The size, 16 KB organised as eight 2 KB pages, is that of the described
// system. The 32-bit word width and the registered-output behaviour are
// choices of this design.
module dp_ram
  import vim_pkg::*;
#(
  parameter int unsigned WORDS = DP_WORDS,
  parameter int unsigned WIDTH = DATA_W
) (
  input  logic                     clk,
  // port A: IMU (PLD side)
  input  logic                     a_en,
  input  logic                     a_wr,
  input  logic [$clog2(WORDS)-1:0] a_addr,
  input  logic [WIDTH-1:0]         a_din,
  output logic [WIDTH-1:0]         a_dout,
  // port B: processor side
  input  logic                     b_en,
  input  logic                     b_wr,
  input  logic [$clog2(WORDS)-1:0] b_addr,
  input  logic [WIDTH-1:0]         b_din,
  output logic [WIDTH-1:0]         b_dout
);

  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_wr) mem[a_addr] <= a_din;
      else      a_dout      <= mem[a_addr];
    end
    if (b_en) begin
      if (b_wr) mem[b_addr] <= b_din;
      else      b_dout      <= mem[b_addr];
    end
  end

endmodule
