// sram_sp: single-port synchronous SRAM, one 704 x 8 block of the image
// combiner's memory (the chip uses sixteen such macros).
//
// One access per clock: with ce high, a write (we high) stores d at addr, a
// read (we low) presents the word at addr on q after the next rising edge.
// q holds its value while ce is low. This array stands in for a foundry
// single-port macro; the size is the published one, the one-cycle read
// latency and the hold-on-idle output are this design's choice.
module sram_sp #(
  parameter int unsigned DEPTH = 704,
  parameter int unsigned WIDTH = 8,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             ce,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ce) begin
      if (we) mem[addr] <= d;
      else    q         <= mem[addr];
    end
  end

endmodule
