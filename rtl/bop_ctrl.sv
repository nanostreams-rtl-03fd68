// bop_ctrl: control state machine of the option-pricing accelerator.
//
// Four states, as the document describes the control logic:
//   INIT - after reset, copy the pricing kernel (bop_pkg) into the
//          instruction memory of every Nanocore over the control bus, one
//          word per cycle, then set each core's run bit;
//   IDLE - wait for the go signal from the master processor;
//   SEND - let the input stream through to the scatter unit until the word
//          marked last has been taken;
//   WALK - the cores perform the binomial walk; wait until the gather unit
//          reports that the batch of results has gone out, then set done and
//          return to IDLE.
// The controller owns the control bus only in INIT (bus_own); at other times
// the master's bridge does. The state list follows the document; the load
// order, the bus sharing and the handshakes are this design's choice. All
// signals are on the system clock.
module bop_ctrl
  import nc_pkg::*;
  import bop_pkg::*;
#(
  parameter int unsigned N_CORES = 8,
  parameter int unsigned DATA_W  = 64,
  localparam int unsigned CW     = (N_CORES > 1) ? $clog2(N_CORES) : 1,
  localparam int unsigned TAW    = CB_AW + CW + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              go,
  input  logic              in_last_taken,
  input  logic              batch_done,
  output logic              gate_open,
  output logic              bus_own,
  output logic              cb_req,
  output logic              cb_we,
  output logic [TAW-1:0]    cb_addr,
  output logic [DATA_W-1:0] cb_wdata,
  output logic [1:0]        state_o,
  output logic              done
);
  typedef enum logic [1:0] {S_INIT, S_IDLE, S_SEND, S_WALK} state_e;
  state_e state;

  logic [CW-1:0] core;
  logic [5:0]    widx;     // 0..BOP_PROG_LEN-1 program words, BOP_PROG_LEN = run bit
  logic          last_core, prog_done;

  assign last_core = ((CW+1)'(core) == (CW+1)'(N_CORES - 1));
  assign prog_done = (widx == 6'(BOP_PROG_LEN));

  assign bus_own   = (state == S_INIT);
  assign gate_open = (state == S_SEND);
  assign cb_req    = bus_own;
  assign cb_we     = 1'b1;
  assign state_o   = state;

  always_comb begin
    if (prog_done) begin
      cb_addr  = {1'b0, core, RGN_CTRL, 8'd0, CR_CTRL};
      cb_wdata = DATA_W'(1);   // run
    end else begin
      cb_addr  = {1'b0, core, RGN_IMEM, 4'd0, widx};
      cb_wdata = DATA_W'(bop_word(32'(widx)));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_INIT; core <= '0; widx <= '0; done <= 1'b0;
    end else begin
      case (state)
        S_INIT: begin
          if (prog_done) begin
            widx <= '0;
            if (last_core) state <= S_IDLE;
            else           core  <= core + 1'b1;
          end else begin
            widx <= widx + 6'd1;
          end
        end
        S_IDLE: if (go) begin state <= S_SEND; done <= 1'b0; end
        S_SEND: if (in_last_taken) state <= S_WALK;
        S_WALK: if (batch_done) begin state <= S_IDLE; done <= 1'b1; end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
