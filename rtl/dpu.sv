// dpu - data processing unit: pipeline of processing engines between the
// receiver and the data storage controller.
//
// Normal mode: raw 192-bit words go through the decoder (bit planes to 192
// pixels of 16 bits) and then through NUM_PE buffering PEs, each of which can be
// bypassed from the CSR (pe_bypass[i]). Raw mode (raw_mode = 1): the decoder is
// skipped and raw words go through the raw buffer instead; they leave in bits
// [191:0] of the output word with out_raw = 1, so the storage controller can
// store them in fewer memory words. While raw_mode is high the decoder's group
// counter is held at zero, so decoding restarts aligned when raw mode ends.
// When both paths hold data the raw buffer goes first; change the mode only
// between acquisitions if order across modes matters. All ports are Avalon-ST
// (valid/ready/data). The PE chain with bypasses, the decoder and the raw buffer
// path follow the system description; the number and depth of the PEs and the
// out_raw marker are this design's.
module dpu
  import pts_pkg::*;
#(
  parameter int unsigned NUM_PE    = 2,  // buffering PEs after the decoder
  parameter int unsigned PE_DEPTH  = 4,  // words per PE buffer
  parameter int unsigned RAW_DEPTH = 4   // words in the raw buffer
) (
  input  logic              clk,        // system clock
  input  logic              rst_n,      // asynchronous reset, active low
  input  logic              raw_mode,   // CSR: bypass the decoder via the raw buffer
  input  logic [NUM_PE-1:0] pe_bypass,  // CSR: detach PE i
  output logic [NUM_PE-1:0] pe_bypassed,// PE i currently detached
  input  logic              in_valid,   // from receiver: valid
  output logic              in_ready,   // from receiver: ready
  input  logic [COLS-1:0]   in_data,    // from receiver: raw word
  output logic              out_valid,  // to DSC: valid
  input  logic              out_ready,  // to DSC: ready
  output pix_word_t         out_data,   // to DSC: pixel word (or raw word)
  output logic              out_raw     // to DSC: word is a raw word
);

  logic dec_in_valid, dec_in_ready;
  logic raw_in_valid, raw_in_ready, raw_out_valid, raw_out_ready;
  logic [COLS-1:0] raw_out_data;
  logic [$clog2(RAW_DEPTH):0] raw_level;

  logic      s_valid [NUM_PE+1];
  logic      s_ready [NUM_PE+1];
  pix_word_t s_data  [NUM_PE+1];

  always_comb begin
    dec_in_valid = in_valid && !raw_mode;
    raw_in_valid = in_valid &&  raw_mode;
    in_ready     = raw_mode ? raw_in_ready : dec_in_ready;
  end

  dpu_decoder u_decoder (
    .clk, .rst_n, .clear(raw_mode),
    .in_valid(dec_in_valid), .in_ready(dec_in_ready), .in_data,
    .out_valid(s_valid[0]), .out_ready(s_ready[0]), .out_data(s_data[0])
  );

  for (genvar i = 0; i < NUM_PE; i++) begin : g_pe
    dpu_pe_slot #(.WIDTH(PIX_WORD_W), .DEPTH(PE_DEPTH)) u_slot (
      .clk, .rst_n, .bypass(pe_bypass[i]), .bypassed(pe_bypassed[i]),
      .in_valid(s_valid[i]), .in_ready(s_ready[i]), .in_data(s_data[i]),
      .out_valid(s_valid[i+1]), .out_ready(s_ready[i+1]), .out_data(s_data[i+1])
    );
  end

  stream_fifo #(.WIDTH(COLS), .DEPTH(RAW_DEPTH)) u_raw_buffer (
    .clk, .rst_n,
    .in_valid(raw_in_valid), .in_ready(raw_in_ready), .in_data,
    .out_valid(raw_out_valid), .out_ready(raw_out_ready), .out_data(raw_out_data),
    .level(raw_level)
  );

  always_comb begin
    out_raw           = raw_out_valid;
    out_valid         = raw_out_valid || s_valid[NUM_PE];
    out_data          = raw_out_valid ? pix_word_t'(PIX_WORD_W'(raw_out_data)) : s_data[NUM_PE];
    raw_out_ready     = out_ready;
    s_ready[NUM_PE]   = out_ready && !raw_out_valid;
  end

endmodule
