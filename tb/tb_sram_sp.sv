// tb_sram_sp: self-checking test of the single-port 704 x 8 SRAM block.
// Fills every word with pseudo-random data, reads all of it back in a
// different order, and checks the one-cycle read latency, that a write does
// not disturb q, and that q holds while the block is not enabled.
module tb_sram_sp;
  localparam int DEPTH = 704;
  logic       clk = 0;
  logic       ce, we;
  logic [9:0] addr;
  logic [7:0] d, q;
  logic [7:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  sram_sp dut (.clk, .ce, .we, .addr, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h exp %02h", what, got, exp);
    end
  endtask

  initial begin
    ce = 0; we = 0; addr = 0; d = 0;
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      ref_mem[a] = 8'($urandom);
      ce = 1; we = 1; addr = 10'(a); d = ref_mem[a];
      @(negedge clk);
    end
    // read back in a scrambled order: a -> (a * 387) mod 704 visits all
    // words only if gcd(387,704)=1, which holds (704 = 2^6 * 11, 387 = 9*43)
    for (int i = 0; i < DEPTH; i++) begin
      int a;
      a = (i * 387) % DEPTH;
      ce = 1; we = 0; addr = 10'(a);
      @(negedge clk);
      check(q, ref_mem[a], $sformatf("read addr %0d", a));
    end
    // q holds while idle and across a write
    addr = 10'd5; we = 0; ce = 1;
    @(negedge clk);
    check(q, ref_mem[5], "read 5");
    ce = 0; addr = 10'd6;
    repeat (3) @(negedge clk);
    check(q, ref_mem[5], "hold while ce low");
    ce = 1; we = 1; addr = 10'd7; d = ~ref_mem[7]; ref_mem[7] = ~ref_mem[7];
    @(negedge clk);
    check(q, ref_mem[5], "hold during write");
    we = 0;
    @(negedge clk);
    check(q, ref_mem[7], "read after overwrite");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
