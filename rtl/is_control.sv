// is_control: image sensor (IS) control logic.
//
// Holds the ICAI counter, which counts clock cycles and wraps every PERIOD
// (1000) cycles, one line period. In a period where acq_en is high it
// strobes the sensors on count 0, which starts their store/output sequence:
// after T_STORE (247) cycles each sensor puts out its NPIX (704) pixels, one
// per cycle, and the PGA and ADC add DL cycles of latency. A two-state
// machine (IDLE, ACQUIRE) follows the counter: it enters ACQUIRE when the
// counter reaches T_STORE + DL and returns to IDLE at T_STORE + NPIX + DL,
// so 'sample' is high for exactly the 704 cycles that carry pixels and
// pix_addr counts them 0..703. Counter, states and thresholds are the
// published ones. Free-running the counter from reset, the one-cycle strobe
// on count 0 and dropping to IDLE at once when acq_en falls are this
// design's choices.
module is_control
  import icai_pkg::*;
#(
  parameter int unsigned PER  = PERIOD,
  parameter int unsigned TST  = T_STORE,
  parameter int unsigned NP   = NPIX,
  parameter int unsigned CW   = $clog2(PER),
  parameter int unsigned AW   = $clog2(NP)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          acq_en,      // this period acquires a line
  input  logic [3:0]    dl,          // reg_sample_delays
  output logic [CW-1:0] cnt,         // ICAI counter
  output logic          period_end,  // last cycle of a period
  output logic          strobe,      // sensor start pulse
  output logic          sample,      // pixel on pdata this cycle
  output logic [AW-1:0] pix_addr     // index of that pixel
);

  typedef enum logic {S_IDLE, S_ACQ} state_e;
  state_e state_q, state_d;

  logic [CW-1:0] cnt_d;
  logic [CW-1:0] t_start, t_stop;

  assign period_end = (cnt == CW'(PER - 1));
  assign cnt_d      = period_end ? '0 : cnt + 1'b1;
  assign t_start    = CW'(TST) + CW'(dl);
  assign t_stop     = CW'(TST + NP) + CW'(dl);

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      S_IDLE: if (acq_en && cnt_d == t_start) state_d = S_ACQ;
      S_ACQ:  if (!acq_en || cnt_d == t_stop) state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      state_q  <= S_IDLE;
      pix_addr <= '0;
    end else begin
      cnt     <= cnt_d;
      state_q <= state_d;
      if (state_q == S_ACQ) pix_addr <= pix_addr + 1'b1;
      else                  pix_addr <= '0;
    end
  end

  assign strobe = acq_en && (cnt == '0);
  assign sample = (state_q == S_ACQ) && acq_en;

  a_addr_in_line: assert property (@(posedge clk) disable iff (!rst_n)
    sample |-> (pix_addr < AW'(NP)))
    else $error("pixel index beyond the line");
  a_strobe_idle: assert property (@(posedge clk) disable iff (!rst_n)
    strobe |-> (state_q == S_IDLE))
    else $error("strobe while acquiring");

endmodule
