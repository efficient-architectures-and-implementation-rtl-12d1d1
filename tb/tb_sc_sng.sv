// tb_sc_sng -- self-checking testbench for sc_sng.
//
// Three generators with the three feedback polynomials used in the function
// units are driven with the same binary value. After each reload the testbench
// steps its own model of each random sequence and checks every output bit
// (bit = random < b), then checks that a full 1024-bit stream carries exactly b
// ones (the generator's exact-probability property). It also checks that the
// stream stops when `en` is low and that reset and `load` restart the sequence.
module tb_sc_sng;
  import sc_tb_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       load = 1'b0;
  logic       en = 1'b0;
  logic [9:0] b = '0;
  logic [2:0] bits;

  sc_sng #(.TAPS(10'h240), .SEED(10'h001)) u_x (.clk, .rst_n, .load, .en, .b, .bit_o (bits[0]));
  sc_sng #(.TAPS(10'h204), .SEED(10'h001)) u_a (.clk, .rst_n, .load, .en, .b, .bit_o (bits[1]));
  sc_sng #(.TAPS(10'h390), .SEED(10'h001)) u_b (.clk, .rst_n, .load, .en, .b, .bit_o (bits[2]));

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  localparam int TAPM [3] = '{TAP_X, TAP_A, TAP_B};

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic stream(input int bv);
    int r [3];
    int ones [3];
    logic [2:0] held;
    @(negedge clk);
    b = 10'(bv);
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    en = 1'b1;
    r = '{1, 1, 1};
    ones = '{0, 0, 0};
    for (int t = 0; t < 1024; t++) begin
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (bits[k] != (r[k] < bv)) begin
          failures++;
          if (failures < 10) $display("sng %0d b=%0d t=%0d: bit %0d", k, bv, t, bits[k]);
        end
        ones[k] += int'(bits[k]);
        r[k] = step(r[k], TAPM[k]);
      end
      if (t == 300) begin
        // hold for a few cycles: the random number must not move
        held = bits;
        en = 1'b0;
        repeat (3) begin
          @(negedge clk);
          checks++;
          if (bits != held) begin
            failures++;
            $display("stream moved while en was low");
          end
        end
        en = 1'b1;
        @(negedge clk);
      end else begin
        @(negedge clk);
      end
    end
    en = 1'b0;
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (ones[k] != bv) begin
        failures++;
        $display("sng %0d: %0d ones for b=%0d", k, ones[k], bv);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    stream(0);
    stream(1);
    stream(512);
    stream(1023);
    stream(333);
    repeat (4) stream(int'($urandom_range(0, 1023)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
