// tb_read_out_logic: checks the read-out multiplexer. With random data on
// all sixteen block outputs, stage s must place bank (s+2) mod 4, blocks
// 4b..4b+3, on bits 31:24 .. 7:0 of the output word.
module tb_read_out_logic;
  logic [1:0]       stage;
  logic [15:0][7:0] q;
  logic [31:0]      hrdata;
  int checks = 0, failures = 0;

  read_out_logic dut (.reg_sram_output_ctrl(stage), .sramb_q(q), .wire_hrdata(hrdata));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 200; it++) begin
      int b;
      logic [31:0] exp;
      for (int i = 0; i < 16; i++) q[i] = 8'($urandom);
      stage = 2'(it % 4);
      #1;
      b = (int'(stage) + 2) % 4;
      exp = {q[4*b], q[4*b+1], q[4*b+2], q[4*b+3]};
      checks++;
      if (hrdata !== exp) begin
        failures++;
        $display("FAIL stage %0d got %08h exp %08h", stage, hrdata, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
