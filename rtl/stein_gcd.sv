// Stein (binary) GCD engine.
//
// Computes gcd(u, v) with shifts and subtractions only, one rule per clock:
//   u = 0 -> v,  v = 0 -> u                     (termination)
//   u, v both even  -> gcd = 2*gcd(u/2, v/2)    (k counts these steps)
//   u even, v odd   -> gcd(u/2, v)
//   u odd,  v even  -> gcd(u, v/2)
//   both odd, u>=v  -> gcd((u-v)/2, v)
//   both odd, u<v   -> gcd((v-u)/2, u)
// When one operand reaches zero the other is shifted left by k to restore
// the common power of two. The rules are the published ones; one rule per
// clock and the handshake are this design's choice.
//
// Interface: pulse start for one clock with a and b valid. done drops on
// the next clock and rises again when result holds gcd(a,b); result and
// done then hold until the next start. rst (synchronous, active high)
// clears result and done.
//
// Timing: one clock per rule plus one to finish, so data dependent; at
// WIDTH = 8 at most 16 clocks (reached by gcd(128,129)) and about 11 on
// average over all operand pairs.
module stein_gcd #(
  parameter int unsigned WIDTH = gcd_alu_pkg::DATA_WIDTH
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] result,
  output logic             done
);

  localparam int unsigned KW = $clog2(WIDTH + 1);

  logic [WIDTH-1:0] u, v;
  logic [KW-1:0]    k;
  logic             busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      u      <= '0;
      v      <= '0;
      k      <= '0;
      busy   <= 1'b0;
      result <= '0;
      done   <= 1'b0;
    end else if (start) begin
      u    <= a;
      v    <= b;
      k    <= '0;
      busy <= 1'b1;
      done <= 1'b0;
    end else if (busy) begin
      if (u == '0) begin
        result <= v << k;
        busy   <= 1'b0;
        done   <= 1'b1;
      end else if (v == '0) begin
        result <= u << k;
        busy   <= 1'b0;
        done   <= 1'b1;
      end else if (!u[0] && !v[0]) begin
        u <= u >> 1;
        v <= v >> 1;
        k <= k + 1'b1;
      end else if (!u[0]) begin
        u <= u >> 1;
      end else if (!v[0]) begin
        v <= v >> 1;
      end else if (u >= v) begin
        u <= (u - v) >> 1;
      end else begin
        u <= (v - u) >> 1;
        v <= u;
      end
    end
  end

endmodule
