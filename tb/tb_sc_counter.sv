// tb_sc_counter -- self-checking testbench for sc_counter.
//
// Drives random bits with a random enable and occasional clears, tracking the
// expected count in the testbench, then feeds an all-ones stream longer than
// 2^W bits to check that the count saturates at 2^W-1 instead of wrapping.
module tb_sc_counter;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       clr = 1'b0;
  logic       en = 1'b0;
  logic       bit_i = 1'b0;
  logic [9:0] count;

  sc_counter u_dut (.clk, .rst_n, .clr, .en, .bit_i, .count);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int model = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cyc(input bit c, input bit e, input bit bi);
    @(negedge clk);
    clr = c; en = e; bit_i = bi;
    @(posedge clk);
    if (c) model = 0;
    else if (e && bi && model < 1023) model++;
    #1;
    checks++;
    if (int'(count) != model) begin
      failures++;
      if (failures < 10) $display("count %0d expected %0d", count, model);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    checks++;
    if (count != 0) failures++;
    for (int i = 0; i < 5000; i++)
      cyc(($urandom_range(0, 299) == 0), $urandom_range(0, 3) != 0, $urandom_range(0, 1) != 0);
    cyc(1'b1, 1'b0, 1'b0);
    for (int i = 0; i < 1100; i++) cyc(1'b0, 1'b1, 1'b1);
    checks++;
    if (count != 10'd1023) begin
      failures++;
      $display("no saturation: %0d", count);
    end
    cyc(1'b1, 1'b1, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
