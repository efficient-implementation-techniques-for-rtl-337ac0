// pm_osc_model: behavioural model of the free-running clock oscillators of N
// processor modules, for testbenches only.
//
// Oscillator i produces a one-cycle tick of the sampling clock every
// PER[i]/40 sampling cycles on average (a fractional accumulator), so the
// document's simulated clock periods of 164, 170 and 176 time units give
// ticks every 4.1, 4.25 and 4.4 sampling cycles: raw clocks that drift apart
// by about 7 %. `stop` holds an oscillator (a stuck clock).
module pm_osc_model #(
  parameter int unsigned N = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  int unsigned  per [N],  // period in 1/40 sampling cycles, >= 80
  input  logic [N-1:0] stop,
  output logic [N-1:0] tick
);
  int unsigned acc [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) acc[i] <= 0;
      tick <= '0;
    end else begin
      for (int i = 0; i < N; i++) begin
        if (stop[i]) begin
          tick[i] <= 1'b0;
        end else if (acc[i] + 40 >= per[i]) begin
          tick[i] <= 1'b1;
          acc[i]  <= acc[i] + 40 - per[i];
        end else begin
          tick[i] <= 1'b0;
          acc[i]  <= acc[i] + 40;
        end
      end
    end
  end
endmodule
