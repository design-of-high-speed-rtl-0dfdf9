// search_ctrl: operation sequencer of the CAM and source of the global EN.
//
// What it does: accepts one command at a time (READ, WRITE or COMPARE) with a
// valid/ready handshake and steps the array through it:
//
//   S_IDLE  EN low: matchlines grounded, C1 nodes precharged, every Px off.
//           ready is high; on a handshake `load` captures the word, address
//           and operation.
//   S_WRITE word line on (`wl_en`) for one cycle.
//   S_READ  the addressed row is read (`cap_read`).
//   S_EVAL  EN high: rows whose parameter matches are powered and compare.
//   S_SENSE EN still high: matchline outputs have settled, `cap_search`
//           captures the encoder output.
//
// `rsp_valid` is high for one cycle after the last state of each operation.
// Latencies from the accepting edge to rsp_valid: WRITE and READ 2 cycles,
// COMPARE 3 cycles; a new command is accepted in the cycle rsp_valid is high.
//
// From the source design: the three operation modes and the EN phases
// (initialise with EN low, then COMPARE with EN high). Own choices: the
// handshake, the one-operation-at-a-time sequencing and the cycle counts.
module search_ctrl
  import pbcam_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    cmd_valid,
  input  cam_op_e cmd_op,
  output logic    cmd_ready,
  output logic    load,        // capture the command's word/address
  output logic    wl_en,       // word line: write the row
  output logic    en,          // global EN of the matchline sense amplifiers
  output logic    cap_read,    // capture read data
  output logic    cap_search,  // capture the search result
  output logic    rsp_valid,
  output cam_op_e rsp_op
);

  typedef enum logic [2:0] {
    S_IDLE  = 3'd0,
    S_WRITE = 3'd1,
    S_READ  = 3'd2,
    S_EVAL  = 3'd3,
    S_SENSE = 3'd4
  } state_e;

  state_e  state_q, state_d;
  cam_op_e op_q;
  logic    rsp_q;

  assign cmd_ready = (state_q == S_IDLE);
  assign load      = cmd_valid && cmd_ready;

  always_comb begin
    state_d = state_q;
    case (state_q)
      S_IDLE: if (load) begin
        case (cmd_op)
          OP_WRITE:   state_d = S_WRITE;
          OP_COMPARE: state_d = S_EVAL;
          default:    state_d = S_READ;
        endcase
      end
      S_EVAL:  state_d = S_SENSE;
      default: state_d = S_IDLE;     // S_WRITE, S_READ, S_SENSE
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      op_q    <= OP_READ;
      rsp_q   <= 1'b0;
    end else begin
      state_q <= state_d;
      if (load) op_q <= cmd_op;
      rsp_q   <= (state_q == S_WRITE) || (state_q == S_READ) || (state_q == S_SENSE);
    end
  end

  assign wl_en      = (state_q == S_WRITE);
  assign cap_read   = (state_q == S_READ);
  assign en         = (state_q == S_EVAL) || (state_q == S_SENSE);
  assign cap_search = (state_q == S_SENSE);
  assign rsp_valid  = rsp_q;
  assign rsp_op     = op_q;

  // The word line and the compare phase never overlap: writing drives the
  // search lines as bit lines.
  a_wl_not_en: assert property (@(posedge clk) disable iff (!rst_n) !(wl_en && en));
  // A command is accepted only when idle.
  a_load_idle: assert property (@(posedge clk) disable iff (!rst_n) load |-> state_q == S_IDLE);

endmodule
