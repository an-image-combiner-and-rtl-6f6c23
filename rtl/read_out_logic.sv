// read_out_logic: selects one SRAM bank onto the rearranged image word.
//
// The stage index reg_sram_output_ctrl picks the bank that was completed in
// the two previous stages, and its four blocks are placed side by side on
// wire_hrdata (first block of the bank in [31:24], last in [7:0]):
//
//   stage  31:24    23:16    15:8     7:0
//   00     block8   block9   block10  block11   (bank 2)
//   01     block12  block13  block14  block15   (bank 3)
//   10     block0   block1   block2   block3    (bank 0)
//   11     block4   block5   block6   block7    (bank 1)
//
// Purely combinational, as in the published read-out multiplexer.
module read_out_logic
  import icai_pkg::*;
(
  input  logic [1:0]           reg_sram_output_ctrl,
  input  logic [NBLK-1:0][7:0] sramb_q,
  output logic [31:0]          wire_hrdata
);

  localparam logic [1:0] RD_BANK [4] = '{2'd2, 2'd3, 2'd0, 2'd1};

  always_comb begin
    for (int lane = 0; lane < NSENS; lane++)
      wire_hrdata[31-8*lane -: 8] = sramb_q[4*RD_BANK[reg_sram_output_ctrl] + lane];
  end

endmodule
