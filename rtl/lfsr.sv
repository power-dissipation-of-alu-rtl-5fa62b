// Linear feedback shift register used as the BIST test pattern generator.
//
// A WIDTH-bit register that, when en is high, shifts one place towards the
// most significant bit; the new least significant bit is the XNOR of the
// bits selected by TAPS. XNOR feedback makes the all-zero state legal, so
// the register resets to zero and the first patterns are 0, 1, 3, ...
// (the all-ones state is the one that locks up). The default TAPS = 8'hA2
// (bits 7, 5, 1) reproduces the first-input pattern sequence of the
// reference simulation, 0, 1, 3, 6, 12, 25, 51, 103, 207, and has period
// 24; 8'h8C (bits 7, 3, 2) reproduces the second-input sequence 0, 1, 3,
// 7, 14, 29, 59, 118, 236 and has period 254. Bit 7 as a tap is this
// design's choice; the printed sequences do not fix it.
//
// INVERT = 0 selects plain XOR feedback instead, the textbook form, whose
// SEED must then be non-zero (all zeros would repeat forever). For
// example WIDTH = 3, TAPS = 3'b110, INVERT = 0, SEED = 3'b001 is the 3-bit
// register with the second and third flip-flop outputs fed back to the
// first, which steps through all 7 non-zero states.
//
// Interface: q is the current pattern, updated on the clock edge at which
// en is high. rst is synchronous and active high and loads SEED.
module lfsr #(
  parameter int unsigned      WIDTH  = gcd_alu_pkg::DATA_WIDTH,
  parameter logic [WIDTH-1:0] TAPS   = 8'hA2,
  parameter bit               INVERT = 1'b1,
  parameter logic [WIDTH-1:0] SEED   = '0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  output logic [WIDTH-1:0] q
);

  logic feedback;

  always_comb begin
    feedback = INVERT ^ (^(q & TAPS));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      q <= SEED;
    end else if (en) begin
      q <= {q[WIDTH-2:0], feedback};
    end
  end

endmodule
