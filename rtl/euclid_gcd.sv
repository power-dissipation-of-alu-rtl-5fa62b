// Euclid GCD engine (subtraction form).
//
// Computes gcd(a, b) by the rules gcd(a,0)=a, gcd(a,a)=a,
// gcd(a,b)=gcd(a-b,b) for b<a and gcd(a,b)=gcd(a,b-a) for a<b: each clock
// the larger of the two working registers is replaced by the difference,
// until they are equal or one of them is zero. gcd(0,b)=b and gcd(0,0)=0.
// The subtraction form, rather than the a mod b form, is used so that no
// divider is needed; that choice and the handshake are this design's.
//
// Interface: pulse start for one clock with a and b valid. done drops on
// the next clock and rises again when result holds gcd(a,b); result and
// done then hold until the next start. rst (synchronous, active high)
// clears result and done.
//
// Timing: one subtraction per clock plus one cycle to finish, so the
// latency depends on the data; worst case is gcd(2**WIDTH-1, 1) with
// 2**WIDTH-1 clocks (255 at WIDTH = 8); the average over all 8-bit pairs
// is about 20.
module euclid_gcd #(
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

  logic [WIDTH-1:0] x, y;
  logic             busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      x      <= '0;
      y      <= '0;
      busy   <= 1'b0;
      result <= '0;
      done   <= 1'b0;
    end else if (start) begin
      x    <= a;
      y    <= b;
      busy <= 1'b1;
      done <= 1'b0;
    end else if (busy) begin
      if (y == '0 || x == y) begin
        result <= x;            // gcd(a,0) = a, gcd(a,a) = a
        busy   <= 1'b0;
        done   <= 1'b1;
      end else if (x == '0) begin
        result <= y;            // gcd(0,b) = b
        busy   <= 1'b0;
        done   <= 1'b1;
      end else if (y < x) begin
        x <= x - y;             // gcd(a,b) = gcd(a-b,b)
      end else begin
        y <= y - x;             // gcd(a,b) = gcd(a,b-a)
      end
    end
  end

endmodule
