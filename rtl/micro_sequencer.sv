// micro_sequencer: steps through a micro-program in the control ROM and
// drives the control lines of the ALU slices.
//
// In IDLE a `start` pulse loads the program counter with `start_addr`. In
// RUN the sequencer addresses the control ROM with the program counter,
// passes the fetched micro-instruction to the datapath with `exec` high, and
// advances by one word per clock. A word with its `last` flag set ends the
// program: the sequencer returns to IDLE and pulses `done` for one cycle in
// the cycle after that word executed. `start` is ignored while busy.
//
// Timing: a program of K words started at clock edge 0 executes its words
// in the cycles after edges 0 .. K-1 and raises `done` after edge K.
// The sequencing scheme (linear program counter, end flag) is this design's
// choice; the source states only that a micro-sequencer or control ROM
// supplies the slices' control signals.
module micro_sequencer
  import rapcla_pkg::*;
#(
  parameter int unsigned AW = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] start_addr,
  output logic [AW-1:0] rom_addr,
  input  uinstr_t       rom_data,
  output uinstr_t       ctrl,
  output logic          exec,
  output logic          busy,
  output logic          done
);

  typedef enum logic {S_IDLE, S_RUN} state_e;

  state_e        state;
  logic [AW-1:0] pc;

  assign busy     = (state == S_RUN);
  assign exec     = busy;
  assign rom_addr = pc;
  assign ctrl     = rom_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      pc    <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          pc    <= start_addr;
          state <= S_RUN;
        end
        S_RUN: begin
          if (rom_data.last) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            pc <= pc + 1'b1;
          end
        end
      endcase
    end
  end

  // done is a single-cycle pulse
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n) done |=> !done);

endmodule
