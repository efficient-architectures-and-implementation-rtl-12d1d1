// tb_sc_func_top -- end-to-end testbench for sc_func_top at its default size.
//
// Sweeps every 10-bit input x = 0..1023, one 1024-bit conversion each, through
// all eight function units at once. For every conversion and every function it
// checks the result against the bit-accurate reference model in sc_tb_pkg and
// the start-to-done latency (1025 cycles). Over the sweep it accumulates the
// mean absolute error (MAE) of each unit against the exact mathematical
// function, prints it, and checks it for the functions whose circuit realises
// the segment line exactly (ln(1+x), tanh, sigmoid, sin: MAE below 0.01).
//
// It also counts how often each mechanism of the design was exercised and
// fails if one never was: each of the 8 segments (LUT addresses), the lower
// (X1) and upper (X2) multiplexer paths of the sin(pi x)/pi and e^-2x units,
// the one-bit delay element holding a value different from the current
// product (seen as ones out of the XOR of e^-2x), counter saturation (an
// all-ones output stream), and a start pulse ignored because a conversion was
// running.
module tb_sc_func_top;
  import sc_pkg::*;
  import sc_tb_pkg::*;

  localparam int LATENCY = 1025;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       start = 1'b0;
  logic [9:0] x = '0;
  logic       busy, done;
  logic [9:0] y [NFUNC];

  sc_func_top u_dut (.clk, .rst_n, .start, .x, .busy, .done, .y);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  int seg_seen [8];
  int n_x1 = 0, n_x2 = 0, n_delay = 0, n_sat = 0, n_ignored = 0;
  real mae [8];

  initial begin
    repeat (1100 * 1030) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(input int xv, input bit poke);
    int lat, e;
    @(negedge clk);
    x = 10'(xv);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done && lat < LATENCY + 10) begin
      if (poke && lat == 100) begin
        x = 10'(xv ^ 10'h3ff);
        start = 1'b1;
        n_ignored++;
      end
      @(negedge clk);
      start = 1'b0;
      lat++;
    end
    checks++;
    if (lat != LATENCY) begin
      failures++;
      $display("x=%0d: latency %0d", xv, lat);
    end
    seg_seen[xv >> 7]++;
    if (xv < 512) n_x1++; else n_x2++;
    // On the X1 path of e^-2x a one can only come out of the XOR when the
    // delayed product differs from the current one.
    if (xv < 512 && y[FN_EXP2] != 0) n_delay++;
    for (int f = 0; f < 8; f++) begin
      e = ref_count(f, xv);
      checks++;
      if (int'(y[f]) != e) begin
        failures++;
        if (failures < 20) $display("fn %0d x=%0d: y=%0d expected %0d", f, xv, y[f], e);
      end
      if (y[f] == 10'd1023 && ideal(f, xv) >= 1023.5) n_sat++;
      mae[f] += rabs(real'(y[f]) / 1024.0 - true_f(f, real'(xv) / 1024.0));
    end
  endtask

  initial begin
    static string names [8] = '{"ln(1+x)", "tanh(x)", "sigmoid(x)", "sin(x)",
                                "exp(-2x)", "cos(x)", "exp(-x)", "sin(pi x)/pi"};
    foreach (mae[f]) mae[f] = 0.0;
    foreach (seg_seen[s]) seg_seen[s] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int xv = 0; xv < 1024; xv++) run_one(xv, xv == 300);

    for (int f = 0; f < 8; f++) begin
      mae[f] = mae[f] / 1024.0;
      $display("MAE %-14s %0.4f", names[f], mae[f]);
      if (f < 4) begin
        checks++;
        if (mae[f] > 0.01) begin
          failures++;
          $display("MAE of %s too large", names[f]);
        end
      end
    end

    for (int s = 0; s < 8; s++) begin
      checks++;
      if (seg_seen[s] == 0) begin
        failures++;
        $display("segment %0d never used", s);
      end
    end
    $display("mechanisms: X1 path %0d, X2 path %0d, delay differs %0d, saturations %0d, ignored starts %0d",
             n_x1, n_x2, n_delay, n_sat, n_ignored);
    checks += 5;
    if (n_x1 == 0) failures++;
    if (n_x2 == 0) failures++;
    if (n_delay == 0) failures++;
    if (n_sat == 0) failures++;
    if (n_ignored == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
