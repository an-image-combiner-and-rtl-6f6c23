// tb_write_in_logic: checks the write-in demultiplexer. For every stage and
// many random words, the next cycle must show write enables on exactly four
// blocks, the right byte on each, and the sample's address. The expected
// block of each sensor is worked out from the bank rule: sensors A and C
// (bytes 31:24 and 15:8) go to bank s, blocks 4s and 4s+2; sensors B and D
// go to bank s-1 mod 4, blocks 4(s-1)+1 and 4(s-1)+3.
module tb_write_in_logic;
  logic              clk = 0, rst_n = 0;
  logic [1:0]        stage;
  logic              wr;
  logic [9:0]        addr;
  logic [31:0]       pdata;
  logic [15:0][7:0]  d;
  logic [15:0]       we;
  logic [9:0]        waddr;
  int checks = 0, failures = 0;

  write_in_logic dut (.clk, .rst_n, .reg_sram_input_ctrl(stage), .wr, .addr,
                      .wire_pdata(pdata), .reg_sramb_d(d), .we, .waddr);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int dest(int s, int lane);
    int bank;
    bank = (lane % 2 == 0) ? s : (s + 3) % 4;
    return 4 * bank + lane;
  endfunction

  initial begin
    stage = 0; wr = 0; addr = 0; pdata = 0;
    @(negedge clk); rst_n = 1;
    @(negedge clk);
    checks++; if (we !== 16'h0) begin failures++; $display("FAIL we after reset"); end
    for (int it = 0; it < 400; it++) begin
      logic [15:0] exp_we;
      stage = 2'(it % 4);
      wr    = (it % 5 != 4);
      addr  = 10'($urandom_range(0, 703));
      pdata = $urandom;
      @(negedge clk);
      exp_we = '0;
      if (wr) for (int lane = 0; lane < 4; lane++) exp_we[dest(stage, lane)] = 1'b1;
      checks++;
      if (we !== exp_we) begin
        failures++; $display("FAIL stage %0d we %04h exp %04h", stage, we, exp_we);
      end
      if (wr) begin
        checks++;
        if (waddr !== addr) begin failures++; $display("FAIL waddr"); end
        for (int lane = 0; lane < 4; lane++) begin
          checks++;
          if (d[dest(stage, lane)] !== pdata[31-8*lane -: 8]) begin
            failures++;
            $display("FAIL stage %0d lane %0d block %0d d=%02h", stage, lane,
                     dest(stage, lane), d[dest(stage, lane)]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
