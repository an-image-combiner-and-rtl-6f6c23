// tb_is_control: checks the IS control logic over eight line periods with
// acquisition switched on and off and the sample delay DL varied. Every
// cycle it compares against a counter kept by the testbench: the ICAI
// counter wraps every 1000 cycles (period_end on count 999), the strobe
// appears only on count 0 of an acquiring period, and 'sample' is high for
// exactly the 704 cycles 247+DL .. 950+DL with pix_addr = count - 247 - DL.
module tb_is_control;
  localparam int PER = 1000, TST = 247, NP = 704;
  logic       clk = 0, rst_n = 0;
  logic       acq_en;
  logic [3:0] dl;
  logic [9:0] cnt, pix_addr;
  logic       period_end, strobe, sample;
  int checks = 0, failures = 0;
  int ref_cnt = 0, nsamples = 0, nstrobes = 0;

  is_control dut (.clk, .rst_n, .acq_en, .dl, .cnt, .period_end, .strobe,
                  .sample, .pix_addr);

  always #5 clk = ~clk;

  initial begin
    repeat (12000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cnt %0d)", what, ref_cnt);
    end
  endtask

  initial begin
    acq_en = 0; dl = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    ref_cnt = 0;
    for (int p = 0; p < 8; p++) begin
      int smp;
      acq_en = (p != 0) && (p != 4);
      dl     = 4'((p * 5) % 16);
      smp = 0;
      for (int c = 0; c < PER; c++) begin
        logic exp_s;
        #1;
        exp_s = acq_en && (c >= TST + dl) && (c < TST + NP + dl);
        chk(cnt == 10'(c), $sformatf("counter %0d", cnt));
        chk(period_end == (c == PER - 1), "period_end");
        chk(strobe == (acq_en && c == 0), "strobe");
        chk(sample == exp_s, $sformatf("sample p%0d dl%0d", p, dl));
        if (exp_s) begin
          chk(pix_addr == 10'(c - TST - dl), "pix_addr");
          smp++;
        end
        if (strobe) nstrobes++;
        @(negedge clk);
        ref_cnt++;
      end
      chk(smp == (acq_en ? NP : 0), "704 samples per acquiring period");
      nsamples += smp;
    end
    chk(nstrobes == 6, "strobe count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
