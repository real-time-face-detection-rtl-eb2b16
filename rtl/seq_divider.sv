// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// `start` loads the dividend and divisor; N clocks later `done` pulses for
// one clock and `quotient` (floor(dividend / divisor)) and `remainder` hold
// the result until the next start. `busy` is high while the divider
// iterates. A start while busy restarts the division. Division by zero
// returns an all-ones quotient; callers are expected to avoid it.
module seq_divider #(
  parameter int unsigned N = 28,   // dividend and quotient width
  parameter int unsigned D = 19    // divisor and remainder width
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] dividend,
  input  logic [D-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] quotient,
  output logic [D-1:0] remainder
);

  localparam int unsigned CW = $clog2(N + 1);

  logic [D-1:0]  div_q;
  logic [D-1:0]  rem;
  logic [N-1:0]  quo;
  logic [CW-1:0] steps;
  logic [D:0]    trial;
  logic          fits;

  always_comb begin
    trial = {rem, quo[N-1]};
    fits  = trial >= {1'b0, div_q};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_q <= '0;
      rem   <= '0;
      quo   <= '0;
      steps <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        div_q <= divisor;
        rem   <= '0;
        quo   <= dividend;
        steps <= CW'(N);
        busy  <= 1'b1;
      end else if (busy) begin
        rem   <= fits ? D'(trial - {1'b0, div_q}) : D'(trial);
        quo   <= {quo[N-2:0], fits};
        steps <= steps - 1'b1;
        if (steps == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quotient  = quo;
  assign remainder = rem;

endmodule
