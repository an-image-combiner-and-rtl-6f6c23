// tb_iss: the whole image sensor system of the camera: sixteen sensors in
// four staggered groups, four ICAIs, and a host that configures them alike
// and reads them together. Each ICAI has its own host bus. One image of
// 704 ground lines is taken; each ground line is 4 x 2816 = 11,264 pixels,
// assembled from the four ICAIs' packets, which must arrive in the same
// cycles. Every pixel is compared with the pattern of its sensor
// (sensors 4g .. 4g+3 behind ICAI g), re-paired as A(t) B(t+1) C(t) D(t+1).
module tb_iss;
  import icai_pkg::*;
  import tb_pix_pkg::*;

  localparam int NG = 4;
  logic        clk = 0, rst_n = 0;
  logic        hsel = 0, htrans = 0, hwrite = 0;
  logic [31:0] hwdata = 0;
  logic [31:0] hrdata [NG];
  logic [31:0] pdata [NG];
  logic [NG-1:0] hrdata_oe, hready, strobe;
  logic [2:0]  pga [NG];
  logic [3:0]  adc_lat = 0;
  int          line_no [NG];
  int checks = 0, failures = 0;
  int ground_lines = 0, pixels = 0;

  for (genvar g = 0; g < NG; g++) begin : g_grp
    icai u_icai (.hclk(clk), .hresetn(rst_n), .hselx(hsel), .htrans, .hwrite, .hwdata,
                 .hrdata(hrdata[g]), .hrdata_oe(hrdata_oe[g]), .hready(hready[g]),
                 .strobe(strobe[g]), .pga(pga[g]), .pdata(pdata[g]));
    iisl_model #(.BASE(4 * g)) u_sensors (.clk, .strobe(strobe[g]), .pga(pga[g]),
                 .adc_lat, .pdata(pdata[g]), .line_no(line_no[g]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (800_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    cfg_t c;
    int pk, wi, t0;
    logic prev;
    c = '{rows_x704: 25'd1, pga: 3'd4, sample_delay: 4'd6};
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    hsel = 1; htrans = 1; hwrite = 1; hwdata = 32'(c);
    @(negedge clk);
    htrans = 0; adc_lat = 4'd6;
    @(negedge clk);
    t0 = line_no[0];
    htrans = 1; hwrite = 0;
    pk = 0; wi = 0; prev = 0;
    forever begin
      @(negedge clk);
      chk(hready == {NG{hready[0]}}, "the four ICAIs send in step");
      if (hready[0]) begin
        if (pk > 0 && wi < NPIX) begin
          for (int g = 0; g < NG; g++) begin
            logic [31:0] exp;
            exp = {pix(4 * g,     t0 + pk,     wi, 4), pix(4 * g + 1, t0 + pk + 1, wi, 4),
                   pix(4 * g + 2, t0 + pk,     wi, 4), pix(4 * g + 3, t0 + pk + 1, wi, 4)};
            chk(hrdata[g] == exp, $sformatf("ICAI %0d line %0d word %0d", g, pk, wi));
            pixels += 4;
          end
        end
        if (pk > 0 && wi == NPIX)
          for (int g = 0; g < NG; g++) chk(hrdata[g] == 32'(pk), "line index");
        if (pk > 0 && wi == NPIX + 1)
          for (int g = 0; g < NG; g++)
            chk(hrdata[g] == ((pk == NPIX) ? EOF_WORD : EOL_WORD), "EOL / EOF");
        wi++;
      end
      if (!hready[0] && prev) begin
        if (pk > 0) ground_lines++;
        pk++; wi = 0;
        if (pk == NPIX + 1) break;
      end
      prev = hready[0];
    end
    hsel = 0;
    chk(ground_lines == 704, $sformatf("ground lines %0d", ground_lines));
    chk(pixels == 704 * 11264, $sformatf("pixels %0d", pixels));
    $display("image: %0d lines of %0d pixels", ground_lines, pixels / ground_lines);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
