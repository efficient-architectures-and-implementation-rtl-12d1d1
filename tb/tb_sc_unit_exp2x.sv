// tb_sc_unit_exp2x -- self-checking testbench for sc_unit_exp2x.
//
// Instantiates the e^-2x unit and runs one conversion per test input x. For every
// conversion it checks, for each instance:
//   * the result equals the bit-accurate count from the independent reference
//     model in sc_tb_pkg (same random sequences, same gate network);
//   * the result lies within a tolerance of the circuit's ideal expected value;
//   * done rises exactly 1025 cycles after the start cycle (1024 stream bits
//     plus the load cycle) and busy is high in between.
// One conversion also receives a second start pulse while busy, which must be
// ignored. The inputs cover both ends of every segment plus random values.
module tb_sc_unit_exp2x;
  import sc_pkg::*;
  import sc_tb_pkg::*;

  localparam int NU = 1;
  localparam int FNS [NU] = '{4};
  localparam int LATENCY = 1025;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          start = 1'b0;
  logic [9:0]    x = '0;
  logic [NU-1:0] busy, done;
  logic [9:0]    y [NU];

  sc_unit_exp2x u_dut0 (
    .clk, .rst_n, .start, .x, .busy (busy[0]), .done (done[0]), .y (y[0])
  );

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(input int xv, input bit poke);
    int lat, exp_cnt, tol;
    real id;
    @(negedge clk);
    x = 10'(xv);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    x = ~x;                       // x must have been captured at start
    lat = 1;
    while (!(&done)) begin
      checks++;
      if (busy != '1) begin
        failures++;
        $display("busy low during conversion, x=%0d lat=%0d", xv, lat);
      end
      if (poke && lat == 500) start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      lat++;
      if (lat > LATENCY + 10) break;
    end
    checks++;
    if (lat != LATENCY) begin
      failures++;
      $display("latency %0d, expected %0d (x=%0d)", lat, LATENCY, xv);
    end
    for (int u = 0; u < NU; u++) begin
      exp_cnt = ref_count(FNS[u], xv);
      id = ideal(FNS[u], xv);
      tol = (FNS[u] == 4 && xv < 512) ? 96 : 32;
      checks += 2;
      if (int'(y[u]) != exp_cnt) begin
        failures++;
        $display("fn %0d x=%0d: y=%0d expected %0d", FNS[u], xv, y[u], exp_cnt);
      end
      if (rabs(real'(y[u]) - id) > real'(tol)) begin
        failures++;
        $display("fn %0d x=%0d: y=%0d too far from ideal %f", FNS[u], xv, y[u], id);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    checks++;
    if (done != '0 || busy != '0) begin
      failures++;
      $display("not idle after reset");
    end
    begin
      static int xs [18] = '{0, 1, 127, 128, 255, 256, 383, 384, 511, 512, 639, 640, 767, 768, 895, 896, 1000, 1023};
      foreach (xs[i]) run_one(xs[i], i == 5);
      repeat (8) run_one(int'($urandom_range(0, 1023)), 1'b0);
      // results hold while idle
      repeat (20) @(negedge clk);
      checks++;
      if (!(&done)) begin
        failures++;
        $display("done did not hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
