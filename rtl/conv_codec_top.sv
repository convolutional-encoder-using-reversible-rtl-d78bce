// conv_codec_top: convolutional encoder and parallel Viterbi decoder joined
// by a block buffer and a channel error mask.
//
// Message bits enter the encoder one per cycle while msg_valid is high. They
// are taken in blocks of N bits; the encoder is cleared with the first bit of
// every block, so each block is encoded from the all-zero state, which is the
// state the decoder assumes. The encoder's symbol pairs are exposed on
// code/code_valid and written into a buffer of N symbol pairs, each XORed with
// its two bits of an error mask on the way in (bits 2i+1:2i for pair i, bit 1
// on the pair's first bit), which models a noisy channel. err_mask is sampled
// together with the first message bit of each block and applies to that whole
// block; keep it at 0 for an error-free link. The decoder reads the whole
// buffer at once.
//
// Timing: the last symbol pair of a block is written one cycle after its
// message bit; one cycle later decoded, decoded_pm (the metric of the chosen
// path) and the one-cycle pulse block_valid are registered from the decoder,
// i.e. block_valid follows the block's last msg_valid by 2 cycles. Blocks may
// follow each other with no gap. rst_n is an active-low asynchronous reset.
// The buffer and the fixed block framing are this design's own choice for
// connecting the bit-serial encoder to the block-parallel decoder.
module conv_codec_top
  import conv_pkg::*;
#(
  parameter int unsigned N = N_STAGES,
  parameter int unsigned W = PM_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         msg_valid,
  input  logic         msg,
  input  logic [2*N-1:0] err_mask,
  output symbol_t      code,
  output logic         code_valid,
  output logic [N-1:0] decoded,      // decoded[0]: first bit of the block
  output logic [W-1:0] decoded_pm,
  output logic         block_valid
);
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1;

  logic [CW-1:0] in_cnt, cap_cnt;
  logic [2*N-1:0] mask_q;
  symbol_t       buffer [N];
  logic          buffer_full;
  logic [N-1:0]  dec_bits;
  logic [W-1:0]  dec_pm;

  conv_encoder u_enc (
    .clk(clk), .rst_n(rst_n),
    .clr(msg_valid && in_cnt == '0),
    .in_valid(msg_valid), .msg(msg),
    .code(code), .code_valid(code_valid)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_cnt      <= '0;
      cap_cnt     <= '0;
      buffer_full <= 1'b0;
      block_valid <= 1'b0;
      decoded     <= '0;
      decoded_pm  <= '0;
      mask_q      <= '0;
      for (int i = 0; i < N; i++) buffer[i] <= '0;
    end else begin
      if (msg_valid) in_cnt <= (in_cnt == CW'(N - 1)) ? '0 : in_cnt + 1'b1;
      if (msg_valid && in_cnt == '0) mask_q <= err_mask;

      buffer_full <= 1'b0;
      if (code_valid) begin
        buffer[cap_cnt] <= code ^ mask_q[2*cap_cnt +: 2];
        cap_cnt         <= (cap_cnt == CW'(N - 1)) ? '0 : cap_cnt + 1'b1;
        buffer_full     <= (cap_cnt == CW'(N - 1));
      end

      block_valid <= buffer_full;
      if (buffer_full) begin
        decoded    <= dec_bits;
        decoded_pm <= dec_pm;
      end
    end
  end

  viterbi_decoder #(.N(N), .W(W)) u_vd (.rx(buffer), .bits(dec_bits), .pm_final(dec_pm));
endmodule
