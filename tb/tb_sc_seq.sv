// tb_sc_seq -- self-checking testbench for sc_seq.
//
// Checks the conversion framing: `load` only for a start seen while idle,
// exactly STREAM_LEN (1024) enabled cycles after it, done one cycle after the
// last of them and held until the next start, and a start while busy ignored.
module tb_sc_seq;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic load, en, busy, done;

  sc_seq u_dut (.clk, .rst_n, .start, .load, .en, .busy, .done);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_run(input int poke_at);
    int n_en, lat;
    @(negedge clk);
    start = 1'b1;
    #1;
    checks++;
    if (!load) begin
      failures++;
      $display("no load on start");
    end
    @(negedge clk);
    start = 1'b0;
    n_en = 0;
    lat = 1;
    while (!done && lat < 1100) begin
      if (en) n_en++;
      if (lat == poke_at) begin
        start = 1'b1;
        #1;
        checks++;
        if (load) begin
          failures++;
          $display("load while busy");
        end
      end
      @(negedge clk);
      start = 1'b0;
      lat++;
    end
    checks += 3;
    if (n_en != 1024) begin
      failures++;
      $display("%0d enabled cycles", n_en);
    end
    if (lat != 1025) begin
      failures++;
      $display("done after %0d cycles", lat);
    end
    if (busy || en) begin
      failures++;
      $display("still busy at done");
    end
    repeat (5) @(negedge clk);
    checks++;
    if (!done || busy) begin
      failures++;
      $display("done not held");
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (load || en || busy || done) failures++;
    rst_n = 1'b1;
    one_run(0);
    one_run(17);
    one_run(1024);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
