// icai: image combiner and acquisition interface (ICAI), chip top.
//
// One ICAI serves a group of four staggered 704-pixel CMOS line sensors and
// hands the host straight 2816-pixel image lines. It is made of three parts:
//   * is_control     - the 1000-cycle line counter, sensor strobe and the
//                      IDLE/ACQUIRE machine that samples Pdata;
//   * image_combiner - write-in demultiplexer, sixteen 704 x 8 SRAM blocks
//                      in four banks, read-out multiplexer;
//   * host_interface - command decode, programmable registers (PGA gain,
//                      sample delay, image height) and the line packets.
// The ports are those of the chip: host side HCLK, HRESETn, HSELx, HTRANS,
// HWRITE, HRWDATA[31:0], HREADY; sensor side Strobe, PGA[2:0],
// Pdata[31:0]. The bidirectional HRWDATA bus is split here into its input
// (hwdata), output (hrdata) and output enable (hrdata_oe); the pad ring
// joins them. Pdata carries sensor A in [31:24], B in [23:16], C in [15:8]
// and D in [7:0]; B and D are the sensors that see a ground line one line
// period later than A and C.
//
// Timing (8 MHz clock in the published chip): one line every PERIOD = 1000
// cycles; a Read Image command is answered with the configuration word in
// the first period, nothing in the next two, then one 706-word packet per
// period until the requested 704 x N lines have gone.
module icai
  import icai_pkg::*;
#(
  parameter int unsigned PER = PERIOD,
  parameter int unsigned TST = T_STORE,
  parameter int unsigned NP  = NPIX
) (
  input  logic        hclk,
  input  logic        hresetn,
  input  logic        hselx,
  input  logic        htrans,
  input  logic        hwrite,
  input  logic [31:0] hwdata,
  output logic [31:0] hrdata,
  output logic        hrdata_oe,
  output logic        hready,
  output logic        strobe,
  output logic [2:0]  pga,
  input  logic [31:0] pdata
);

  localparam int unsigned CW = $clog2(PER);
  localparam int unsigned AW = $clog2(NP);

  cfg_t          cfg;
  logic [CW-1:0] cnt;
  logic          period_end, acq_en, sample, rd_en;
  logic [AW-1:0] pix_addr, rd_addr;
  logic [1:0]    in_stage, out_stage;
  logic [31:0]   wire_hrdata;

  is_control #(.PER(PER), .TST(TST), .NP(NP), .CW(CW), .AW(AW)) u_is_ctrl (
    .clk        (hclk),
    .rst_n      (hresetn),
    .acq_en     (acq_en),
    .dl         (cfg.sample_delay),
    .cnt        (cnt),
    .period_end (period_end),
    .strobe     (strobe),
    .sample     (sample),
    .pix_addr   (pix_addr)
  );

  image_combiner #(.DEPTH(NP), .AW(AW)) u_combiner (
    .clk         (hclk),
    .rst_n       (hresetn),
    .in_stage    (in_stage),
    .out_stage   (out_stage),
    .wr          (sample),
    .wr_addr     (pix_addr),
    .wire_pdata  (pdata),
    .rd_en       (rd_en),
    .rd_addr     (rd_addr),
    .wire_hrdata (wire_hrdata)
  );

  host_interface #(.PER(PER), .TST(TST), .NP(NP), .CW(CW), .AW(AW)) u_host_if (
    .clk                  (hclk),
    .rst_n                (hresetn),
    .hsel                 (hselx),
    .htrans               (htrans),
    .hwrite               (hwrite),
    .hwdata               (hwdata),
    .hready               (hready),
    .hrdata               (hrdata),
    .hrdata_oe            (hrdata_oe),
    .cfg                  (cfg),
    .cnt                  (cnt),
    .period_end           (period_end),
    .acq_en               (acq_en),
    .reg_sram_input_ctrl  (in_stage),
    .reg_sram_output_ctrl (out_stage),
    .rd_en                (rd_en),
    .rd_addr              (rd_addr),
    .wire_hrdata          (wire_hrdata),
    .mode                 ()
  );

  assign pga = cfg.pga;

endmodule
