// piso_out: parallel-in serial-out output register for the digest.
//
// On load the first OUT_WORDS lanes of the state (the digest, the state
// truncated to the hash length) are captured; on the following OUT_WORDS
// cycles hash_valid is high and hash_out carries one W-bit word per cycle,
// lane 0 first. There is no back-pressure: the receiver takes a word at every
// rising edge while hash_valid is high. A load while words are still being
// shifted out restarts the output with the new digest. For an OUT_BITS that
// is not a multiple of W the last word carries some state bits beyond the
// digest, which the receiver drops. Synchronous active-low reset.
module piso_out #(
  parameter int unsigned OUT_BITS = 256,
  parameter int unsigned W        = 64,
  localparam int unsigned OUT_WORDS = (OUT_BITS + W - 1) / W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   load,
  input  logic [OUT_WORDS*W-1:0] din,
  output logic                   hash_valid,
  output logic [W-1:0]           hash_out
);

  localparam int unsigned CW = $clog2(OUT_WORDS + 1);

  logic [OUT_WORDS*W-1:0] shreg;
  logic [CW-1:0]          left;   // words still to be shown

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shreg <= '0;
      left  <= '0;
    end else if (load) begin
      shreg <= din;
      left  <= CW'(OUT_WORDS);
    end else if (left != '0) begin
      shreg <= shreg >> W;
      left  <= left - 1'b1;
    end
  end

  assign hash_valid = (left != '0);
  assign hash_out   = shreg[W-1:0];

endmodule
