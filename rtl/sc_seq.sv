// sc_seq -- conversion sequencer for one stochastic function unit.
//
// A conversion uses streams of STREAM_LEN bits (1024 in the reference
// configuration). A `start` seen while idle produces a one-cycle `load`
// (combinational with start) in which the unit samples x, reseeds its SNGs and
// clears its counter. The next STREAM_LEN cycles have `en` high: one stochastic
// bit per cycle is generated and counted. After the last of them `busy` falls
// and `done` rises and stays high until the next start, so the result is valid
// STREAM_LEN+1 cycles after the start cycle. A `start` during a conversion is
// ignored. The whole handshake is this implementation's choice; only the stream
// length comes from the reference configuration.
module sc_seq #(
  parameter int unsigned STREAM_LEN = 1024
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic load,
  output logic en,
  output logic busy,
  output logic done
);

  localparam int unsigned CW = $clog2(STREAM_LEN);

  logic [CW-1:0] cnt;

  assign load = start && !busy;
  assign en   = busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      cnt  <= '0;
    end else if (load) begin
      busy <= 1'b1;
      done <= 1'b0;
      cnt  <= '0;
    end else if (busy) begin
      cnt <= cnt + 1'b1;
      if (cnt == CW'(STREAM_LEN - 1)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  // A result is never flagged valid while its stream is still running, and
  // a conversion is accepted only from idle.
  a_busy_done_excl : assert property (@(posedge clk) disable iff (!rst_n) !(busy && done));
  a_load_when_idle : assert property (@(posedge clk) disable iff (!rst_n) load |-> !busy);

endmodule
