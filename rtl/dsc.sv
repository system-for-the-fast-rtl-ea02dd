// dsc - data storage controller: keeps the on-chip memory (OCM) as a FIFO that
// the host empties.
//
// Words from the DPU (Avalon-ST) are cut into OCM words of DW bits and written
// with Avalon-MM write transactions at consecutive addresses, wrapping at the end
// of the OCM. The write pointer (wptr, in OCM words) is advanced after each
// completed transaction (avm_write with avm_waitrequest low); the host reads the
// OCM up to wptr and then updates the read pointer rptr. Before storing a DPU
// word the controller compares the pointers: if fewer free OCM words remain than
// the word needs (one slot is always left empty, so the OCM holds at most
// 2^AW - 1 words), the word is discarded and the sticky overflow flag is set,
// so unread data are never overwritten. overflow_clr clears the flag.
// A pixel word takes ceil(PIX_WORD_W/DW) OCM words, a raw word (in_raw)
// ceil(COLS/DW). in_ready is high only in the cycle a word is taken; a word
// occupies the controller until its last OCM write completes. The pointers, the
// comparison and the overflow flag follow the system description; discarding
// the word on overflow, the OCM word width and the one-empty-slot rule are this
// design's.
module dsc
  import pts_pkg::*;
#(
  parameter int unsigned AW = 12,   // OCM address width (words)
  parameter int unsigned DW = 256   // OCM word width
) (
  input  logic          clk,              // system clock
  input  logic          rst_n,            // asynchronous reset, active low
  input  logic          in_valid,         // from DPU: valid
  output logic          in_ready,         // from DPU: ready
  input  pix_word_t     in_data,          // from DPU: data
  input  logic          in_raw,           // from DPU: raw word (bits [191:0])
  output logic [AW-1:0] avm_address,      // OCM: word address
  output logic          avm_write,        // OCM: write request
  output logic [DW-1:0] avm_writedata,    // OCM: data
  input  logic          avm_waitrequest,  // OCM: stall
  input  logic [AW-1:0] rptr,             // CSR: read pointer (host)
  output logic [AW-1:0] wptr,             // CSR: write pointer
  output logic          overflow,         // CSR: sticky overflow flag
  input  logic          overflow_clr      // CSR: clear overflow
);

  localparam int unsigned BEATS     = (PIX_WORD_W + DW - 1) / DW;
  localparam int unsigned RAW_BEATS = (COLS + DW - 1) / DW;
  localparam int unsigned BW        = $clog2(BEATS + 1);

  logic [BEATS*DW-1:0] buffer;
  logic [BW-1:0]       beats_left;
  logic [BW-1:0]       beats_needed;
  logic [AW-1:0]       used, free;
  logic                busy, fits;

  assign used          = wptr - rptr;
  assign free          = ~used;  // (2^AW - 1) - used
  assign beats_needed  = in_raw ? BW'(RAW_BEATS) : BW'(BEATS);
  assign fits          = (32'(free) >= 32'(beats_needed));
  assign in_ready      = !busy;
  assign avm_write     = busy;
  assign avm_address   = wptr;
  assign avm_writedata = buffer[DW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      buffer     <= '0;
      beats_left <= '0;
      wptr       <= '0;
      overflow   <= 1'b0;
    end else begin
      if (overflow_clr) overflow <= 1'b0;
      if (!busy) begin
        if (in_valid) begin
          if (fits) begin
            busy       <= 1'b1;
            buffer     <= (BEATS*DW)'(in_data);
            beats_left <= beats_needed;
          end else begin
            overflow <= 1'b1;
          end
        end
      end else if (!avm_waitrequest) begin
        wptr       <= wptr + 1'b1;
        buffer     <= buffer >> DW;
        beats_left <= beats_left - 1'b1;
        if (beats_left == 1) busy <= 1'b0;
      end
    end
  end

  // Avalon-MM rule: a stalled write keeps its address and data.
  a_write_stable: assert property (@(posedge clk) disable iff (!rst_n)
    avm_write && avm_waitrequest |=> avm_write && $stable(avm_address) && $stable(avm_writedata));

endmodule
