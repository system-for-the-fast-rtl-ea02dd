// seq_fetcher - execution unit of the sequencer.
//
// A trigger from the CSR starts execution at start_addr. Entries are read from
// the sequencer RAM one at a time (request/address, data one cycle later) and
// decoded:
//   SEQ_CMD   - {len, data} is offered to the transmitter and held until it is
//               taken (the transmitter takes a command only when idle);
//   SEQ_DELAY - the fetcher first waits until the transmitter has finished, then
//               stays idle for exactly data system clock cycles.
// The entry with `last` set ends the program; the fetcher then waits for the
// transmitter to finish, pulses `done` and returns to idle. `active` is high
// from the trigger to `done` and gives the sequencer the transmitter.
// Timing, which does not depend on software: after a delay of N cycles, the
// next command is handed over N+3 cycles after the transmitter went idle.
// Reading a RAM on a trigger, forwarding to TX, the delay symbol and the last
// marker follow the system description; the entry encoding and the cycle
// timing are this design's.
module seq_fetcher
  import pts_pkg::*;
#(
  parameter int unsigned AW = 10  // sequencer RAM address width
) (
  input  logic              clk,         // system clock
  input  logic              rst_n,       // asynchronous reset, active low
  input  logic              trigger,     // CSR: start the program
  input  logic [AW-1:0]     start_addr,  // CSR: address of the first entry
  output logic              active,      // program running
  output logic              done,        // one-cycle pulse at the end
  output logic              fetch_req,   // RAM: read request
  output logic [AW-1:0]     fetch_addr,  // RAM: entry address
  input  logic [SEQ_DW-1:0] fetch_data,  // RAM: entry, one cycle after request
  output logic              cmd_valid,   // TX: command offered
  output tx_cmd_t           cmd,         // TX: command
  input  logic              cmd_ready,   // TX: command taken
  input  logic              tx_busy      // TX status: sending
);

  typedef enum logic [2:0] {
    S_IDLE, S_FETCH, S_DECODE, S_SEND, S_WAIT_TX, S_DELAY, S_FINISH
  } state_e;

  state_e            state;
  logic [AW-1:0]     addr;
  logic [CMD_DW-1:0] cnt;
  logic              last;
  seq_entry_t        entry;

  assign entry      = seq_entry_t'(fetch_data);
  assign active     = (state != S_IDLE);
  assign fetch_req  = (state == S_FETCH);
  assign fetch_addr = addr;
  assign cmd_valid  = (state == S_SEND);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      addr  <= '0;
      cnt   <= '0;
      last  <= 1'b0;
      cmd   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (trigger) begin
          addr  <= start_addr;
          state <= S_FETCH;
        end
        S_FETCH: state <= S_DECODE;
        S_DECODE: begin
          last <= entry.last;
          if (entry.kind == SEQ_CMD) begin
            cmd   <= '{len: entry.len, data: entry.data};
            state <= S_SEND;
          end else begin
            cnt   <= entry.data;
            state <= S_WAIT_TX;
          end
        end
        S_SEND: if (cmd_ready) begin
          addr  <= addr + 1'b1;
          state <= last ? S_FINISH : S_FETCH;
        end
        S_WAIT_TX: if (!tx_busy) begin
          if (cnt == 0) begin
            addr  <= addr + 1'b1;
            state <= last ? S_FINISH : S_FETCH;
          end else begin
            state <= S_DELAY;
          end
        end
        S_DELAY: begin
          cnt <= cnt - 1'b1;
          if (cnt == 1) begin
            addr  <= addr + 1'b1;
            state <= last ? S_FINISH : S_FETCH;
          end
        end
        S_FINISH: if (!tx_busy) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Avalon-ST style rule: an offered command stays put until it is taken.
  a_cmd_stable: assert property (@(posedge clk) disable iff (!rst_n)
    cmd_valid && !cmd_ready |=> cmd_valid && $stable(cmd));

endmodule
