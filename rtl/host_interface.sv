// host_interface: host command decoder, programmable registers and image
// packet sequencer of the ICAI.
//
// Commands. HSELx, HTRANS and HWRITE are decoded every cycle into Disable,
// Configuration, Read Image, Idle or Reserved. In Configuration the word on
// HRWDATA is stored as {reg_qustedrowx704[24:0], reg_pga[2:0],
// reg_sample_delays[3:0]}.
//
// Reading. When the host enters Read Image the interface waits for the next
// wrap of the ICAI counter and then runs one period of PERIOD cycles per
// step, indexed p = 0, 1, 2, ...:
//   p = 0            the current configuration word is returned;
//   p = 1 .. L+1     the sensors are strobed and a line is acquired, in
//                    combiner stage (p-1) mod 4;
//   p = 3 .. L+2     line p-2 of the combined image is sent;
// where L = 704 * reg_qustedrowx704 is the number of lines requested. So a
// line leaves 3000 cycles after its first half entered. In every period
// that sends something, HREADY is high for 706 cycles starting at counter
// value 247 + DL: 704 words of four pixels (2816 pixels), the line index,
// then End-of-Line, or End-of-File for the last line. HRWDATA is driven
// (hrdata_oe) exactly while HREADY is high. Once the last line has gone the
// interface waits for the host to leave Read Image; leaving Read Image at
// any earlier point abandons the image.
//
// The decode table, the register widths, the packet layout, the 706-cycle
// window and the 3000-cycle latency are the published ones. The order of
// the register fields in the word, aligning a read to the next counter
// wrap, echoing the configuration for the whole 706-cycle window, the line
// index being 1-based (low 32 bits), the EOL/EOF codes and aborting when the
// host leaves Read Image are this design's choices.
//
// Timing: all outputs to the host are registered. The combiner read address
// is issued two cycles before its word appears on HRWDATA (one cycle SRAM,
// one cycle output register).
module host_interface
  import icai_pkg::*;
#(
  parameter int unsigned PER = PERIOD,
  parameter int unsigned TST = T_STORE,
  parameter int unsigned NP  = NPIX,
  parameter int unsigned CW  = $clog2(PER),
  parameter int unsigned AW  = $clog2(NP),
  parameter int unsigned LW  = 25 + AW         // line counter width
) (
  input  logic          clk,
  input  logic          rst_n,
  // host bus
  input  logic          hsel,
  input  logic          htrans,
  input  logic          hwrite,
  input  logic [31:0]   hwdata,
  output logic          hready,
  output logic [31:0]   hrdata,
  output logic          hrdata_oe,
  // programmable registers
  output cfg_t          cfg,
  // IS control logic
  input  logic [CW-1:0] cnt,
  input  logic          period_end,
  output logic          acq_en,
  // image combiner
  output logic [1:0]    reg_sram_input_ctrl,
  output logic [1:0]    reg_sram_output_ctrl,
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  input  logic [31:0]   wire_hrdata,
  // status
  output mode_e         mode
);

  typedef enum logic [1:0] {H_IDLE, H_WAIT, H_RUN, H_DONE} hstate_e;

  hstate_e     hs;
  logic [LW:0] per_idx;       // period index p within the image
  logic [LW:0] lines_total;   // L
  logic [LW:0] last_per;

  assign mode = decode_mode(hsel, htrans, hwrite);

  // ---------------------------------------------------------------- control
  assign last_per = (lines_total == '0) ? '0 : lines_total + (LW+1)'(2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg                  <= '0;
      hs                   <= H_IDLE;
      per_idx              <= '0;
      lines_total          <= '0;
      reg_sram_input_ctrl  <= '0;
      reg_sram_output_ctrl <= '0;
    end else begin
      if (mode == MODE_CONFIG) cfg <= cfg_t'(hwdata);
      unique case (hs)
        H_IDLE: if (mode == MODE_READ) begin
          hs          <= H_WAIT;
          lines_total <= (LW+1)'(cfg.rows_x704) * (LW+1)'(NP);
        end
        H_WAIT: begin
          if (mode != MODE_READ) hs <= H_IDLE;
          else if (period_end) begin
            hs      <= H_RUN;
            per_idx <= '0;
          end
        end
        H_RUN: begin
          if (mode != MODE_READ) hs <= H_IDLE;
          else if (period_end) begin
            if (per_idx == last_per) hs <= H_DONE;
            else begin
              per_idx              <= per_idx + 1'b1;
              reg_sram_input_ctrl  <= per_idx[1:0];   // stage of period p+1
              reg_sram_output_ctrl <= per_idx[1:0];
            end
          end
        end
        H_DONE: if (mode != MODE_READ) hs <= H_IDLE;
      endcase
    end
  end

  logic        run, echo_per, line_per, last_line;
  logic [LW:0] line_idx;

  always_comb begin
    run       = (hs == H_RUN);
    echo_per  = run && (per_idx == '0);
    acq_en    = run && (lines_total != '0) && (per_idx >= (LW+1)'(1))
                && (per_idx <= lines_total + (LW+1)'(1));
    line_per  = run && (lines_total != '0) && (per_idx >= (LW+1)'(3))
                && (per_idx <= lines_total + (LW+1)'(2));
    line_idx  = per_idx - (LW+1)'(2);
    last_line = (line_idx == lines_total);
  end

  // ------------------------------------------------------- packet timing
  // Word n of the packet is on HRWDATA while the counter equals W0 + n,
  // W0 = T_STORE + DL. It is registered one cycle earlier (nxt = cnt + 1),
  // and its SRAM address is issued one cycle before that (rdn = cnt + 2).
  logic [CW+1:0] w0, nxt, rdn, n, ra;
  logic          in_win;

  always_comb begin
    w0      = (CW+2)'(TST) + (CW+2)'(cfg.sample_delay);
    nxt     = (CW+2)'(cnt) + (CW+2)'(1);
    rdn     = (CW+2)'(cnt) + (CW+2)'(2);
    n       = nxt - w0;
    ra      = rdn - w0;
    in_win  = (nxt >= w0) && (nxt < w0 + (CW+2)'(NP + PKT_EXTRA));
    rd_en   = line_per && (rdn >= w0) && (rdn < w0 + (CW+2)'(NP));
    rd_addr = AW'(ra);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hready <= 1'b0;
      hrdata <= '0;
    end else begin
      hready <= (echo_per || line_per) && in_win && (mode == MODE_READ);
      if (!in_win)                  hrdata <= '0;
      else if (echo_per)            hrdata <= 32'(cfg);
      else if (n < (CW+2)'(NP))     hrdata <= wire_hrdata;
      else if (n == (CW+2)'(NP))    hrdata <= line_idx[31:0];
      else if (last_line)           hrdata <= EOF_WORD;
      else                          hrdata <= EOL_WORD;
    end
  end

  assign hrdata_oe = hready;

  // Bus and sequencing rules.
  a_stage_equal: assert property (@(posedge clk) disable iff (!rst_n)
    reg_sram_input_ctrl == reg_sram_output_ctrl)
    else $error("input and output stage index differ");
  a_read_in_line_period: assert property (@(posedge clk) disable iff (!rst_n)
    rd_en |-> line_per)
    else $error("combiner read outside a line period");
  a_hready_only_reading: assert property (@(posedge clk) disable iff (!rst_n)
    hready |-> $past(mode == MODE_READ))
    else $error("HREADY raised outside Read Image");

endmodule
