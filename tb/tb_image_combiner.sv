// tb_image_combiner: runs the combiner through ten line periods the way the
// ICAI does: in period p (stage (p-1) mod 4) the four sensors' line p is
// written word by word while, from period 3 on, the bank completed before
// is read at the same addresses. Word k read in period p must be
// {A(p-2)[k], B(p-1)[k], C(p-2)[k], D(p-1)[k]}: the two lower sensors from
// two periods back and the two upper ones from one period back. A short
// gap separates periods, as in the real line timing.
module tb_image_combiner;
  import tb_pix_pkg::*;
  localparam int NP = 704;
  logic        clk = 0, rst_n = 0;
  logic [1:0]  stage;
  logic        wr, rd_en;
  logic [9:0]  wr_addr, rd_addr;
  logic [31:0] pdata, hrdata;
  int checks = 0, failures = 0;

  image_combiner dut (.clk, .rst_n, .in_stage(stage), .out_stage(stage), .wr,
                      .wr_addr, .wire_pdata(pdata), .rd_en, .rd_addr,
                      .wire_hrdata(hrdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    stage = 0; wr = 0; rd_en = 0; wr_addr = 0; rd_addr = 0; pdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 1; p <= 10; p++) begin
      stage = 2'((p - 1) % 4);
      for (int k = 0; k <= NP; k++) begin
        // cycle k: present write k and read k; check read k-1
        wr      = (k < NP);
        wr_addr = 10'(k);
        pdata   = pix_word(p, k, 0);
        rd_en   = (p >= 3) && (k < NP);
        rd_addr = 10'(k);
        @(negedge clk);
        if (p >= 3 && k < NP) begin
          logic [31:0] exp;
          exp = {pix(0, p - 2, k, 0), pix(1, p - 1, k, 0),
                 pix(2, p - 2, k, 0), pix(3, p - 1, k, 0)};
          checks++;
          if (hrdata !== exp) begin
            failures++;
            if (failures < 10)
              $display("FAIL period %0d word %0d got %08h exp %08h", p, k, hrdata, exp);
          end
        end
      end
      wr = 0; rd_en = 0;
      repeat (4) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
