// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// Pulse `start` with `dividend` and `divisor`; `done` pulses W cycles later
// with `quotient` = dividend / divisor (truncated) and `remainder`. A zero
// divisor returns an all-ones quotient. `busy` is high while dividing; a
// start while busy is ignored. Shared by the units that need a division
// (centroids, average velocity, density ratio) so that each holds only one.
module seq_divider #(
  parameter int unsigned W = 40
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quotient,
  output logic [W-1:0] remainder
);
  logic [W-1:0]          q, d;
  logic [W:0]            r;
  logic [$clog2(W+1)-1:0] cnt;
  logic [W:0]            r_sh, r_sub;

  always_comb begin
    r_sh  = {r[W-1:0], q[W-1]};
    r_sub = r_sh - {1'b0, d};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; q <= '0; d <= '0; r <= '0; cnt <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; q <= dividend; d <= divisor; r <= '0;
        cnt  <= ($clog2(W+1))'(W);
      end else if (busy) begin
        if (!r_sub[W]) begin
          r <= r_sub; q <= {q[W-2:0], 1'b1};
        end else begin
          r <= r_sh;  q <= {q[W-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin busy <= 1'b0; done <= 1'b1; end
      end
    end
  end

  assign quotient  = q;
  assign remainder = r[W-1:0];
endmodule
