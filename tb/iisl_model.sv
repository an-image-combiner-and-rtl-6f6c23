// iisl_model: behavioural model of one interleaved image sensor line: four
// 704-pixel CMOS line sensors (A, B, C, D) sharing a strobe and a gain
// setting, for simulation only.
//
// Each sensor follows the store / output / idle sequence of the real part:
// a strobe starts it and restarts its own counter (which otherwise wraps
// every PER cycles); after TST counts in the store state it outputs NP
// pixels, one per clock, then idles until the next strobe. The pixel values
// come from tb_pix_pkg::pix() for sensors BASE..BASE+3, the exposure number (strobes so far,
// counted in line_no) and the gain pga. The PGA and ADC latency is modelled
// as adc_lat extra clock cycles (0..15) before the pixel reaches pdata.
// Sensor A drives pdata[31:24], B [23:16], C [15:8], D [7:0]; pdata is 0
// outside the output state.
module iisl_model #(
  parameter int PER = 1000,
  parameter int TST = 247,
  parameter int NP  = 704,
  parameter int BASE = 0     // number of the first sensor, for the image pattern
) (
  input  logic        clk,
  input  logic        strobe,
  input  logic [2:0]  pga,
  input  logic [3:0]  adc_lat,
  output logic [31:0] pdata,
  output int          line_no
);
  import tb_pix_pkg::*;

  typedef enum logic [1:0] {IS_IDLE, IS_STORE, IS_OUTPUT} is_state_e;
  is_state_e    st = IS_IDLE;
  int           is_cnt = 0;
  logic [31:0]  raw;
  logic [31:0]  pipe [16];

  initial begin
    line_no = 0;
    for (int i = 0; i < 16; i++) pipe[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (strobe) begin
      st      <= IS_STORE;
      is_cnt  <= 1;
      line_no <= line_no + 1;
    end else begin
      is_cnt <= (is_cnt == PER - 1) ? 0 : is_cnt + 1;
      if (st == IS_STORE && is_cnt + 1 == TST)       st <= IS_OUTPUT;
      if (st == IS_OUTPUT && is_cnt + 1 == TST + NP) st <= IS_IDLE;
    end
  end

  always_comb raw = (st == IS_OUTPUT) ? pix_word(line_no, is_cnt - TST, int'(pga), BASE) : '0;

  always_ff @(posedge clk) begin
    pipe[0] <= raw;
    for (int i = 1; i < 16; i++) pipe[i] <= pipe[i-1];
  end

  assign pdata = (adc_lat == 0) ? raw : pipe[adc_lat - 1];
endmodule
