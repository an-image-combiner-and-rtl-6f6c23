// tb_icai: end-to-end test of the ICAI at its full size (704-pixel lines,
// 1000-cycle line period, 16 blocks of 704 x 8 SRAM) with four modelled
// sensors on Pdata.
//
// The host side is driven as the published command table describes:
// configuration with HSELx=HTRANS=HWRITE=1, reading by holding HTRANS=1,
// HWRITE=0. Three images are taken:
//   1. 704 x 1 lines, gain 5, DL = 3: read to the end (704 packets);
//   2. gain 2, DL = 0: abandoned after 5 lines;
//   3. gain 7, DL = 15: abandoned after 2 lines.
// Every word on HRWDATA is compared with the image computed here from the
// sensor pattern: line L = {A(t0+L), B(t0+L+1), C(t0+L), D(t0+L+1)} where
// t0 counts earlier exposures, followed by the line index and EOL, or EOF
// on the last line. The first packet must be the configuration word, line 1
// must start 3000 cycles after it and later lines 1000 cycles apart, each
// packet 706 cycles long; strobes must stop when an image ends or is
// abandoned. Each mechanism (configuration, echo, the four combiner stages,
// EOL, EOF, abandoning, zero and non-zero DL, ignored writes while
// disabled) is counted and must occur at least once.
module tb_icai;
  import icai_pkg::*;
  import tb_pix_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        hsel = 0, htrans = 0, hwrite = 0;
  logic [31:0] hwdata = 0, hrdata, pdata;
  logic        hrdata_oe, hready, strobe;
  logic [2:0]  pga;
  logic [3:0]  adc_lat = 0;
  int          line_no;
  int checks = 0, failures = 0;
  longint cyc = 0;

  int n_config = 0, n_echo = 0, n_eol = 0, n_eof = 0, n_abort = 0;
  int n_dl_zero = 0, n_dl_nonzero = 0, n_disable_ignored = 0, n_lines = 0;
  int n_stage [4] = '{0, 0, 0, 0};

  icai dut (.hclk(clk), .hresetn(rst_n), .hselx(hsel), .htrans, .hwrite, .hwdata,
            .hrdata, .hrdata_oe, .hready, .strobe, .pga, .pdata);

  iisl_model u_sensors (.clk, .strobe, .pga, .adc_lat, .pdata, .line_no);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // stage index seen by the combiner whenever a line is strobed
  always @(posedge clk) if (strobe) n_stage[dut.u_host_if.reg_sram_input_ctrl]++;

  initial begin
    repeat (900_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  task automatic bus(logic s, logic t, logic w, logic [31:0] d);
    hsel = s; htrans = t; hwrite = w; hwdata = d;
  endtask

  task automatic quiet(int cycles, string what);
    repeat (cycles) begin
      @(negedge clk);
      chk(!hready && !hrdata_oe && !strobe, what);
    end
  endtask

  task automatic take_image(int rows, int g, int dl, int abort_after);
    cfg_t   c;
    int     lines, t0, pk, wi, nstrobe;
    longint last_rise;
    logic   prev;
    c = '{rows_x704: 25'(rows), pga: 3'(g), sample_delay: 4'(dl)};
    lines = rows * NPIX;
    bus(1, 1, 1, 32'(c));
    @(negedge clk);
    n_config++;
    bus(1, 0, 1, 32'hDEAD_BEEF);
    adc_lat = 4'(dl);
    @(negedge clk);
    chk(pga == 3'(g), "PGA output follows reg_pga");
    if (dl == 0) n_dl_zero++; else n_dl_nonzero++;
    t0 = line_no;
    bus(1, 1, 0, 0);
    pk = 0; wi = 0; prev = 0; last_rise = 0; nstrobe = 0;
    forever begin
      @(negedge clk);
      chk(hrdata_oe == hready, "HRWDATA driven only with HREADY");
      if (strobe) nstrobe++;
      if (hready && !prev) begin
        if (pk == 1) chk(cyc - last_rise == 3000, $sformatf("first line latency %0d", cyc - last_rise));
        if (pk > 1)  chk(cyc - last_rise == 1000, "line spacing 1000 cycles");
        last_rise = cyc;
        wi = 0;
      end
      if (hready) begin
        logic [31:0] exp;
        if (pk == 0) exp = 32'(c);
        else if (wi < NPIX)
          exp = {pix(0, t0 + pk, wi, g), pix(1, t0 + pk + 1, wi, g),
                 pix(2, t0 + pk, wi, g), pix(3, t0 + pk + 1, wi, g)};
        else if (wi == NPIX) exp = 32'(pk);
        else exp = (pk == lines) ? EOF_WORD : EOL_WORD;
        chk(hrdata == exp, $sformatf("line %0d word %0d got %08h exp %08h", pk, wi, hrdata, exp));
        if (pk > 0 && wi == NPIX + 1) begin
          if (hrdata == EOF_WORD) n_eof++;
          if (hrdata == EOL_WORD) n_eol++;
        end
        wi++;
      end
      if (!hready && prev) begin
        chk(wi == NPIX + 2, $sformatf("packet length %0d", wi));
        if (pk == 0) n_echo++; else n_lines++;
        pk++;
        if (abort_after >= 0 && pk == abort_after + 1) begin
          bus(1, 0, 1, 0);
          n_abort++;
          quiet(3000, "silent after abandoning");
          return;
        end
        if (pk == lines + 1) begin
          chk(nstrobe == lines + 1, $sformatf("strobes %0d", nstrobe));
          quiet(2500, "silent after last line");
          bus(1, 0, 1, 0);
          return;
        end
      end
      prev = hready;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    quiet(2000, "idle after reset");
    // writes while disabled or in the reserved state are ignored
    bus(0, 1, 1, {25'd9, 3'd6, 4'd9});
    @(negedge clk);
    bus(1, 0, 0, {25'd9, 3'd6, 4'd9});
    @(negedge clk);
    chk(pga == 3'd0, "no configuration while disabled/reserved");
    if (pga == 3'd0) n_disable_ignored++;
    bus(1, 0, 1, 0);
    quiet(500, "idle");

    take_image(1, 5, 3, -1);
    take_image(1, 2, 0, 5);
    take_image(1, 7, 15, 2);

    chk(n_config == 3, "configurations");
    chk(n_echo == 3, "configuration echoes");
    chk(n_lines == 704 + 5 + 2, $sformatf("lines %0d", n_lines));
    chk(n_eol > 0, "EOL seen");
    chk(n_eof == 1, "EOF seen once");
    chk(n_abort == 2, "abandoned images");
    chk(n_dl_zero > 0 && n_dl_nonzero > 0, "zero and non-zero DL");
    chk(n_disable_ignored > 0, "ignored configuration");
    for (int s = 0; s < 4; s++) chk(n_stage[s] > 0, $sformatf("stage %0d used", s));
    $display("mechanisms: config=%0d echo=%0d lines=%0d eol=%0d eof=%0d abort=%0d stages=%0d/%0d/%0d/%0d dl0=%0d dlx=%0d ignored=%0d",
             n_config, n_echo, n_lines, n_eol, n_eof, n_abort, n_stage[0], n_stage[1],
             n_stage[2], n_stage[3], n_dl_zero, n_dl_nonzero, n_disable_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
