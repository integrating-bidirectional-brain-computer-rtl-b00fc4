// Artifact template memory of one canceller back-end.
//
// Holds the learned artifact waveform of every stimulator/sense-channel
// pair served by the back-end: DEPTH words of WIDTH bits, addressed as
// {tap, sense slot}. The chip stores 16 pairs x 32 taps x 10 bits = 5120
// bits in a custom low-voltage SRAM shared by its four back-ends; here each
// back-end owns a quarter of it (4 pairs x 32 taps = 128 words).
//
// Single port, synchronous: a read (en, !we) returns rdata on the next
// cycle; a write (en, we) stores wdata at the clock edge. rdata holds its
// value until the next read. Contents are not reset, as in an SRAM; the
// canceller clears it by writing.
//
// Written as an array so a memory compiler or the synthesis tool can map
// it; the per-back-end split is a choice of this design.
module artifact_sram #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = 10,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
