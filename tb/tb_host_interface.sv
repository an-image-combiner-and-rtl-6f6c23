// tb_host_interface: checks the host interface alone, at a reduced line
// geometry (period 100 cycles, store time 20, 16 pixels per line) so that
// whole images are short. A counter in the testbench plays the IS control
// logic and a one-cycle-latency lookup plays the combiner: the word at
// read address a in stage s is {s, 6'h0, a, 14'h0ABC}.
// Checked: the command decode (configuration taken only with
// HSELx=HTRANS=HWRITE=1), the register fields, the configuration echo in
// the first period, two silent periods, then one packet per period of 16
// data words + line index + EOL (EOF on the last line), HREADY high for 18
// cycles from count 20+DL, acquisition enabled for periods 1..L+1 with the
// stage index counting 0,1,2,3 from period 1, images of N = 1 and N = 2,
// and abandoning an image when the host leaves Read Image.
module tb_host_interface;
  import icai_pkg::*;
  localparam int PER = 100, TST = 20, NP = 16;
  logic        clk = 0, rst_n = 0;
  logic        hsel = 0, htrans = 0, hwrite = 0;
  logic [31:0] hwdata = 0, hrdata, comb_q = 0;
  logic        hready, hrdata_oe, period_end, acq_en, rd_en;
  logic [1:0]  in_stage, out_stage;
  logic [6:0]  cnt = 0;
  logic [3:0]  rd_addr;
  cfg_t        cfg;
  mode_e       mode;
  int checks = 0, failures = 0;

  host_interface #(.PER(PER), .TST(TST), .NP(NP)) dut (
    .clk, .rst_n, .hsel, .htrans, .hwrite, .hwdata, .hready, .hrdata, .hrdata_oe,
    .cfg, .cnt, .period_end, .acq_en, .reg_sram_input_ctrl(in_stage),
    .reg_sram_output_ctrl(out_stage), .rd_en, .rd_addr, .wire_hrdata(comb_q), .mode);

  always #5 clk = ~clk;

  assign period_end = (cnt == 7'(PER - 1));
  always_ff @(posedge clk) begin
    cnt <= period_end ? '0 : cnt + 1'b1;
    if (rd_en) comb_q <= {6'(out_stage), 6'h0, 6'(rd_addr), 14'h0ABC};
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic bus(logic s, logic t, logic w, logic [31:0] d);
    hsel = s; htrans = t; hwrite = w; hwdata = d;
  endtask

  // Reads one image of 'lines' lines with sample delay 'dl'; if abort_after
  // is >= 0 the host goes idle after that many lines.
  task automatic read_image(int lines, int dl, logic [31:0] cfg_word, int abort_after);
    int p;
    bus(1, 1, 0, 0);
    // wait for the first period to start (counter wraps to 0)
    do @(negedge clk); while (cnt != 0);
    p = 0;
    forever begin
      int hr;
      hr = 0;
      for (int c = 0; c < PER; c++) begin
        logic exp_acq, exp_rdy;
        int n;
        n = c - (TST + dl);
        exp_acq = (p >= 1) && (p <= lines + 1);
        exp_rdy = (p == 0 || (p >= 3 && p <= lines + 2)) && n >= 0 && n < NP + 2;
        chk(cnt == 7'(c), "counter alignment");
        chk(acq_en == exp_acq, $sformatf("acq_en p%0d", p));
        chk(hready == exp_rdy, $sformatf("hready p%0d c%0d", p, c));
        chk(hrdata_oe == hready, "oe follows hready");
        if (exp_acq) chk(in_stage == 2'(p - 1) && out_stage == 2'(p - 1), "stage index");
        if (exp_rdy) begin
          logic [31:0] exp;
          if (p == 0)          exp = cfg_word;
          else if (n < NP)     exp = {4'h0, 2'(p - 1), 6'h0, 6'(n), 14'h0ABC};
          else if (n == NP)    exp = 32'(p - 2);
          else if (p - 2 == lines) exp = EOF_WORD;
          else                 exp = EOL_WORD;
          chk(hrdata == exp, $sformatf("word p%0d n%0d got %08h exp %08h", p, n, hrdata, exp));
        end
        if (hready) hr++;
        @(negedge clk);
      end
      chk(hr == ((p == 0 || (p >= 3 && p <= lines + 2)) ? NP + 2 : 0), "706-style window length");
      p++;
      if (abort_after >= 0 && p == abort_after + 3) begin
        bus(1, 0, 1, 0);  // idle
        repeat (3 * PER) begin
          @(negedge clk);
          chk(!hready && !acq_en, "quiet after abort");
        end
        return;
      end
      if (p > lines + 4) break;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // decode table
    bus(0, 1, 1, 32'hFFFF_FFFF); #1 chk(mode == MODE_DISABLE, "decode disable");
    @(negedge clk); chk(cfg == '0, "no config while disabled");
    bus(1, 0, 1, 32'hFFFF_FFFF); #1 chk(mode == MODE_IDLE, "decode idle");
    @(negedge clk);
    bus(1, 0, 0, 32'hFFFF_FFFF); #1 chk(mode == MODE_RESERVED, "decode reserved");
    @(negedge clk); chk(cfg == '0, "no config in idle/reserved");
    bus(1, 1, 0, 0); #1 chk(mode == MODE_READ, "decode read");
    bus(1, 1, 1, {25'd1, 3'd5, 4'd3}); #1 chk(mode == MODE_CONFIG, "decode config");
    @(negedge clk);
    chk(cfg.rows_x704 == 25'd1 && cfg.pga == 3'd5 && cfg.sample_delay == 4'd3, "config fields");
    bus(1, 0, 1, 0);
    repeat (5) @(negedge clk);
    read_image(NP, 3, {25'd1, 3'd5, 4'd3}, -1);
    bus(1, 0, 1, 0);
    repeat (5) @(negedge clk);
    // two-block image (N = 2, 32 lines at this geometry), DL = 9
    bus(1, 1, 1, {25'd2, 3'd1, 4'd9});
    @(negedge clk);
    read_image(2 * NP, 9, {25'd2, 3'd1, 4'd9}, -1);
    bus(1, 0, 1, 0);
    repeat (5) @(negedge clk);
    // second image with DL = 0, abandoned after 3 lines
    bus(1, 1, 1, {25'd1, 3'd2, 4'd0});
    @(negedge clk);
    read_image(NP, 0, {25'd1, 3'd2, 4'd0}, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
