// pvp_system: write-side encoder and read-side detection chain of a
// recording channel with an advanced post-Viterbi processor.
//
// Write side: information bits enter the error detection code encoder, which
// appends M = 3 CRC parity bits to every 200 bits and emits 203-bit
// codewords toward the recording channel.
// Read side: equalized readback samples (target 1 + 6D + 7D^2 + 2D^3) enter
// the Viterbi detector; its decisions, each paired with its own sample, feed
// the post-Viterbi processor, which checks every 203-bit codeword with the
// CRC syndrome and corrects the most likely dominant error event, trying up
// to L = 3 candidates (list-correction) among positions narrowed down by the
// syndrome and the detected bits (position search).
// The recording channel and the equalizer between the two sides are not part
// of this design: the top brings out the codeword bits and takes equalized
// samples in.
//
// Interface: valid/ready streams. enc_*: information bits in, codeword bits
// out (enc_out_last marks position N). rd_*: samples in; corrected codewords
// out as N-bit words (bit p-1 = position p) with a status word. Codewords on
// the read side start with the first sample after reset and follow back to
// back. 'ops_en' low disables the position search (for comparison only).
module pvp_system
  import pvp_pkg::*;
#(
  parameter int unsigned VIT_DEPTH = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ops_en,
  // write side
  input  logic         enc_in_valid,
  output logic         enc_in_ready,
  input  logic         enc_in_bit,
  output logic         enc_out_valid,
  input  logic         enc_out_ready,
  output logic         enc_out_bit,
  output logic         enc_out_last,
  // read side
  input  logic         rd_in_valid,
  output logic         rd_in_ready,
  input  q_t           rd_in_q,
  output logic         rd_out_valid,
  input  logic         rd_out_ready,
  output logic [N-1:0] rd_out_cw,
  output pvp_status_t  rd_out_status
);

  edc_encoder u_enc (
    .clk, .rst_n,
    .in_valid (enc_in_valid),  .in_ready (enc_in_ready), .in_bit (enc_in_bit),
    .out_valid(enc_out_valid), .out_ready(enc_out_ready), .out_bit(enc_out_bit),
    .out_last (enc_out_last)
  );

  logic det_valid, det_ready, det_bit;
  q_t   det_q;

  ml_detector #(.DEPTH(VIT_DEPTH)) u_det (
    .clk, .rst_n,
    .in_valid (rd_in_valid), .in_ready (rd_in_ready), .in_q (rd_in_q),
    .out_valid(det_valid),   .out_ready(det_ready),   .out_bit(det_bit), .out_q(det_q)
  );

  post_viterbi_proc u_pvp (
    .clk, .rst_n, .ops_en,
    .in_valid (det_valid),   .in_ready (det_ready), .in_bit(det_bit), .in_q(det_q),
    .out_valid(rd_out_valid), .out_ready(rd_out_ready),
    .out_cw   (rd_out_cw),    .out_status(rd_out_status)
  );

endmodule
