// main_controller: the main controller (MC) attached to every unit.
//
// It walks the unit's instruction memory: it reads the instruction at the
// current address, hands it to the unit with a one-cycle start pulse, waits for
// the unit's end pulse and moves to the next address. Because the targeted
// applications are static, the program is one global loop: after the
// instruction at last_addr it starts again at address 0 and pulses loop_wrap.
// run must be high for a new instruction to be fetched; dropping it lets the
// running instruction finish and then stops. A fetch costs two cycles (read,
// then start), so one instruction takes at least three cycles plus the unit's
// own time. Sending one instruction at a time, waiting for its end and the
// global loop follow the architecture; the handshake timing and the run input
// are this design's choices. Reset (active low, synchronous) returns to
// address 0 and idle.
module main_controller #(
  parameter int unsigned AW = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  input  logic [AW-1:0] last_addr,
  output logic          read,
  output logic [AW-1:0] addr,
  output logic          start,
  input  logic          end_i,
  output logic          loop_wrap
);
  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_ISSUE, S_WAIT} state_e;
  state_e state;

  assign read  = (state == S_FETCH);
  assign start = (state == S_ISSUE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      addr      <= '0;
      loop_wrap <= 1'b0;
    end else begin
      loop_wrap <= 1'b0;
      unique case (state)
        S_IDLE:  if (run) state <= S_FETCH;
        S_FETCH: state <= S_ISSUE;
        S_ISSUE: state <= S_WAIT;
        S_WAIT:
          if (end_i) begin
            if (addr == last_addr) begin
              addr      <= '0;
              loop_wrap <= 1'b1;
            end else begin
              addr <= addr + 1'b1;
            end
            state <= run ? S_FETCH : S_IDLE;
          end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The unit may only report an end while an instruction is outstanding.
  a_end_in_wait: assert property (@(posedge clk) disable iff (!rst_n)
    end_i |-> state == S_WAIT)
    else $error("main_controller: end without a running instruction");
endmodule
