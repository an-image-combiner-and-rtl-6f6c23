// image_combiner: turns interleaved sensor lines into straight image lines.
//
// The four sensors of a group sit in two staggered rows, so the two upper
// sensors (B, D) see a ground line one line period after the lower ones
// (A, C). A line of the final image is therefore A(t), B(t+1), C(t),
// D(t+1). The combiner keeps 16 single-port 704 x 8 SRAM blocks, grouped in
// four banks of four blocks (bank k = blocks 4k..4k+3), and walks through
// four stages, one per line period:
//
//   * write-in: in stage s, A and C of the incoming line go to bank s and
//     B and D go to bank s-1 (mod 4), so bank s-1 now holds a full line;
//   * read-out: in stage s, bank s+2 (mod 4), completed one stage earlier,
//     is read out, one 32-bit word (one pixel of each sensor) per cycle.
//
// Interface: wr/wr_addr/wire_pdata write one interleaved word per cycle;
// rd_en/rd_addr request a read and wire_hrdata shows that word one cycle
// later. in_stage and out_stage are the stage index registers; the system
// drives both with the same value. A block is written one cycle after its
// sample (write_in_logic registers the data). The bank/stage mapping is the
// published one; sharing a single address port per block between the write
// and read paths is this design's own choice, safe because a block is never
// read and written in the same stage.
module image_combiner
  import icai_pkg::*;
#(
  parameter int unsigned DEPTH = NPIX,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [1:0]    in_stage,     // reg_sram_input_ctrl
  input  logic [1:0]    out_stage,    // reg_sram_output_ctrl
  input  logic          wr,
  input  logic [AW-1:0] wr_addr,
  input  logic [31:0]   wire_pdata,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [31:0]   wire_hrdata
);

  logic [NBLK-1:0][7:0] sramb_d;
  logic [NBLK-1:0][7:0] sramb_q;
  logic [NBLK-1:0]      sramb_we;
  logic [AW-1:0]        waddr;
  logic [1:0]           rd_bank;

  write_in_logic #(.AW(AW)) u_write_in (
    .clk                 (clk),
    .rst_n               (rst_n),
    .reg_sram_input_ctrl (in_stage),
    .wr                  (wr),
    .addr                (wr_addr),
    .wire_pdata          (wire_pdata),
    .reg_sramb_d         (sramb_d),
    .we                  (sramb_we),
    .waddr               (waddr)
  );

  assign rd_bank = out_stage + 2'd2;

  for (genvar b = 0; b < NBLK; b++) begin : g_blk
    logic          ce;
    logic [AW-1:0] addr;
    always_comb begin
      ce   = sramb_we[b] || (rd_en && (rd_bank == 2'(b / 4)));
      addr = sramb_we[b] ? waddr : rd_addr;
    end
    sram_sp #(.DEPTH(DEPTH), .WIDTH(8), .AW(AW)) u_sram (
      .clk  (clk),
      .ce   (ce),
      .we   (sramb_we[b]),
      .addr (addr),
      .d    (sramb_d[b]),
      .q    (sramb_q[b])
    );
  end

  // A block of the bank being read is never written at the same time: the
  // write-in table only ever targets banks s and s-1, the read side bank s+2.
  logic [NBLK-1:0] rd_mask;
  always_comb for (int b = 0; b < NBLK; b++) rd_mask[b] = (rd_bank == 2'(b / 4));

  a_no_rw_conflict: assert property (@(posedge clk) disable iff (!rst_n)
    !(rd_en && |(sramb_we & rd_mask)))
    else $error("SRAM block read and written in the same cycle");

  read_out_logic u_read_out (
    .reg_sram_output_ctrl (out_stage),
    .sramb_q              (sramb_q),
    .wire_hrdata          (wire_hrdata)
  );

endmodule
