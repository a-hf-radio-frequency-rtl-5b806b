// rng48: 48-bit random number generator.
//
// The authentication needs a 48-bit tag random number (TRN) per attempt.
// A 48-bit maximal-length LFSR (x^48 + x^47 + x^21 + x^20 + 1, Fibonacci
// form) runs on every clock; in addition, every change of the field input
// (reader modulation edges, whose timing the tag cannot predict) is folded
// into the register, so the value taken depends on when the reader's frames
// arrived. A request (req) captures the register into rnd_o one cycle later.
// The design asks for a 48-bit random number; the LFSR and the mixing are
// this implementation's choice.
//
// Timing: rnd_o and rnd_valid update on the clock edge after req.
module rng48 #(
  parameter logic [47:0] SEED = 48'hACE1_2468_9BDF
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        entropy_i,  // field input, mixed in on each change
  input  logic        req,
  output logic [47:0] rnd_o,
  output logic        rnd_valid
);
  logic [47:0] lfsr;
  logic        ent_q;
  logic        fb;

  assign fb = lfsr[47] ^ lfsr[46] ^ lfsr[20] ^ lfsr[19] ^ (entropy_i ^ ent_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr      <= SEED;
      ent_q     <= 1'b0;
      rnd_o     <= '0;
      rnd_valid <= 1'b0;
    end else begin
      ent_q     <= entropy_i;
      lfsr      <= (lfsr == '0) ? SEED : {lfsr[46:0], fb};
      rnd_valid <= req;
      if (req) rnd_o <= lfsr;
    end
  end
endmodule
