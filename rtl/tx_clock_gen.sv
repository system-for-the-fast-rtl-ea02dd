// tx_clock_gen - gated, programmable clock for the tested chip.
//
// The generated clock runs only while `en` is high (the transmitter holds it
// high for the length of a command) and rests low otherwise. Each half period
// lasts half_period+1 cycles of the system clock, so the chip clock frequency is
// f_clk / (2*(half_period+1)); half_period comes from a transceiver CSR and may be
// changed at any time. Besides the clock line the block gives two strobes, one
// system cycle wide, that are high in the cycle at whose end sclk rises (`rise`)
// or falls (`fall`); the transmitter and receiver use them instead of clocking
// logic on sclk. A programmable frequency and gating by the transmitter follow
// the system description; the divider scheme and the strobes are this design's.
module tx_clock_gen #(
  parameter int unsigned DIV_W = 16  // width of the half-period register
) (
  input  logic             clk,          // system clock
  input  logic             rst_n,        // asynchronous reset, active low
  input  logic             en,           // run the clock (from the transmitter)
  input  logic [DIV_W-1:0] half_period,  // half period in system cycles, minus one
  output logic             sclk,         // generated chip clock
  output logic             rise,         // sclk goes high at the end of this cycle
  output logic             fall          // sclk goes low at the end of this cycle
);

  logic [DIV_W-1:0] cnt;
  logic             toggle;

  assign toggle = en && (cnt >= half_period);
  assign rise   = toggle && !sclk;
  assign fall   = toggle &&  sclk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      sclk <= 1'b0;
    end else if (!en) begin
      cnt  <= '0;
      sclk <= 1'b0;
    end else if (toggle) begin
      cnt  <= '0;
      sclk <= !sclk;
    end else begin
      cnt  <= cnt + 1'b1;
    end
  end

endmodule
