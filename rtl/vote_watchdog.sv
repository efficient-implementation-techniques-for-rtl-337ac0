// vote_watchdog: time-out watchdog of a pipelined voter.
//
// A vote needs the ready bits of all three channels. When at least one
// channel is ready but the vote has not taken place for TIMEOUT cycles, a
// channel has stalled (or its ready bit has failed): the watchdog raises
// `timeout` for one cycle and reports in `stalled` the channels whose ready
// bit is still clear. The count restarts after every vote and whenever no
// channel is ready. The document asks for such a watchdog and warns that it
// must not be set too tight because of clock skew; the time-out value is not
// given and the default here is this design's own.
module vote_watchdog #(
  parameter int unsigned TIMEOUT = 64  // cycles
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] ready,    // ready bits of the three channels
  input  logic       vote,     // a vote took place this cycle
  output logic       timeout,  // one-cycle pulse
  output logic [2:0] stalled   // channels not ready at the time-out
);

  localparam int unsigned CW = $clog2(TIMEOUT + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      timeout <= 1'b0;
      stalled <= '0;
    end else begin
      timeout <= 1'b0;
      if (vote || ready == 3'b000 || ready == 3'b111) begin
        cnt <= '0;
      end else if (cnt == CW'(TIMEOUT - 1)) begin
        cnt     <= '0;
        timeout <= 1'b1;
        stalled <= ~ready;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
