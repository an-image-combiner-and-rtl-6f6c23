// write_in_logic: steers the four interleaved sensor bytes to SRAM blocks.
//
// The 32-bit interleaved word wire_pdata carries sensor A in [31:24], B in
// [23:16], C in [15:8] and D in [7:0]. The stage index
// reg_sram_input_ctrl selects, for each byte, one of four blocks:
//
//   stage  A(31:24)  B(23:16)  C(15:8)  D(7:0)
//   00     block0    block13   block2   block15
//   01     block4    block1    block6   block3
//   10     block8    block5    block10  block7
//   11     block12   block9    block14  block11
//
// so A and C of one line land in the bank of the stage while B and D land
// in the previous bank, pairing A(t), B(t+1), C(t), D(t+1) in one bank. The
// table is the published write-in demultiplexer. Outputs are registered
// (reg_sramb_x_d): a sample presented with wr high is written into the
// selected blocks one cycle later through we/waddr. Registering the write
// enable and address alongside the data is this design's choice.
module write_in_logic
  import icai_pkg::*;
#(
  parameter int unsigned AW = $clog2(NPIX)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [1:0]           reg_sram_input_ctrl,  // stage index
  input  logic                 wr,                   // sample valid
  input  logic [AW-1:0]        addr,                 // pixel index
  input  logic [31:0]          wire_pdata,
  output logic [NBLK-1:0][7:0] reg_sramb_d,          // per-block write data
  output logic [NBLK-1:0]      we,                   // per-block write enable
  output logic [AW-1:0]        waddr
);

  // Destination block of each lane (lane 0 = A = bits 31:24) per stage.
  localparam logic [3:0] WR_MAP [4][NSENS] = '{
    '{4'd0,  4'd13, 4'd2,  4'd15},
    '{4'd4,  4'd1,  4'd6,  4'd3 },
    '{4'd8,  4'd5,  4'd10, 4'd7 },
    '{4'd12, 4'd9,  4'd14, 4'd11}
  };

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_sramb_d <= '0;
      we          <= '0;
      waddr       <= '0;
    end else begin
      we <= '0;
      if (wr) begin
        waddr <= addr;
        for (int lane = 0; lane < NSENS; lane++) begin
          reg_sramb_d[WR_MAP[reg_sram_input_ctrl][lane]] <= wire_pdata[31-8*lane -: 8];
          we[WR_MAP[reg_sram_input_ctrl][lane]]          <= 1'b1;
        end
      end
    end
  end

endmodule
