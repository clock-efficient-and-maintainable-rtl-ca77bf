// Fall-through header/data serializer.
//
// What it does: when a run request is seen, the module emits one record on a
// byte-wide output, one byte per clock, qualified by data_valid: first each
// header byte whose enable is high (H_A, then H_B, then H_C), then the data
// bytes data[0] .. data[NINPUTS-1].  Disabled headers cost no clock cycle:
// the first byte of the record leaves in the very cycle the registered run
// request is seen, and bytes follow back to back until the last data byte.
//
// How it works: a state register (ST_IDLE, ST_HDR_A, ST_HDR_B, ST_HDR_C,
// ST_SEND) and a data index register are updated on the clock edge.  The
// next-state logic is written as a chain of "if" steps, one per state, over
// local variables instead of one case statement.  Each step runs only if the
// working state variable names it and the "no wait" flag is still set.  A
// step that emits a byte clears the flag, which ends the evaluation for this
// cycle; a step that emits nothing (idle with a request, a disabled header)
// just moves the working state on, and the next step in the chain is then
// evaluated in the same cycle ("fall through").  The value of the working
// state at the end of the chain becomes the next state.  The structure,
// the state names, the registered run input and the asynchronous active-low
// reset follow the design this module reproduces.
//
// This design's own choice: the data index is also carried through the chain
// as a variable.  Idle clears it, and a fall through from idle straight into
// the data phase (all headers disabled) then reads data[0] in that same
// cycle.  Were the index only cleared in the register, a record started with
// every header disabled right after an earlier record would begin from the
// stale index of that earlier record.
//
// Interface and timing:
//   run        level request, registered once (run_s); a record starts in the
//              first cycle in which run_s is high and the machine is idle.
//              The cycle after the last data byte the machine is idle again,
//              so a run held high starts the next record with no gap.
//   hdr_*_en   read combinationally while the corresponding header is
//              evaluated; hold them stable from run until the first data
//              byte has been sent.
//   data       NINPUTS bytes, read combinationally during the data phase;
//              hold them stable until the record ends.
//   data_out,  combinational (Mealy) outputs of the state registers and the
//   data_valid inputs above; data_out is 0 whenever data_valid is low.
//   A record takes exactly (number of enabled headers + NINPUTS) cycles.
module ft_serializer
  import serializer_pkg::*;
#(
  parameter int unsigned NINPUTS  = serializer_pkg::DEF_NINPUTS,
  parameter byte_t       HEADER_A = serializer_pkg::DEF_HEADER_A,
  parameter byte_t       HEADER_B = serializer_pkg::DEF_HEADER_B,
  parameter byte_t       HEADER_C = serializer_pkg::DEF_HEADER_C
) (
  input  logic                     clk,
  input  logic                     rst_n,      // asynchronous, active low
  input  logic                     run,
  input  logic                     hdr_a_en,
  input  logic                     hdr_b_en,
  input  logic                     hdr_c_en,
  input  logic [NINPUTS-1:0][7:0]  data,
  output logic [7:0]               data_out,
  output logic                     data_valid
);

  localparam int unsigned CW = (NINPUTS > 1) ? $clog2(NINPUTS) : 1;
  typedef logic [CW-1:0] idx_t;
  localparam idx_t LAST = idx_t'(NINPUTS - 1);

  state_t state, state_next;
  idx_t   counter, counter_next;
  logic   run_s;

  // Sequential part: state, data index and the registered run request.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ST_IDLE;
      counter <= '0;
      run_s   <= 1'b0;
    end else begin
      state   <= state_next;
      counter <= counter_next;
      run_s   <= run;
    end
  end

  // Combinational part: the fall-through chain.
  always_comb begin
    state_t v_next;   // working state, updated as the chain proceeds
    logic   v_nwait;  // set while no byte has been emitted in this cycle
    idx_t   v_idx;    // working data index

    data_out     = '0;
    data_valid   = 1'b0;
    v_next       = state;
    v_nwait      = 1'b1;
    v_idx        = counter;
    counter_next = counter;

    if (v_nwait && v_next == ST_IDLE) begin
      v_idx = '0;
      if (run_s) v_next = ST_HDR_A;
    end

    if (v_nwait && v_next == ST_HDR_A) begin
      if (hdr_a_en) begin
        data_out   = HEADER_A;
        data_valid = 1'b1;
        v_nwait    = 1'b0;
      end
      v_next = ST_HDR_B;
    end

    if (v_nwait && v_next == ST_HDR_B) begin
      if (hdr_b_en) begin
        data_out   = HEADER_B;
        data_valid = 1'b1;
        v_nwait    = 1'b0;
      end
      v_next = ST_HDR_C;
    end

    if (v_nwait && v_next == ST_HDR_C) begin
      if (hdr_c_en) begin
        data_out   = HEADER_C;
        data_valid = 1'b1;
        v_nwait    = 1'b0;
      end
      v_next = ST_SEND;
    end

    if (v_nwait && v_next == ST_SEND) begin
      data_out   = data[v_idx];
      data_valid = 1'b1;
      v_nwait    = 1'b0;
      if (v_idx == LAST) v_next = ST_IDLE;
      else               v_idx  = v_idx + idx_t'(1);
    end

    counter_next = v_idx;
    state_next   = v_next;
  end

  // Rules of the output stream.
  a_zero_when_idle : assert property (@(posedge clk) disable iff (!rst_n)
    !data_valid |-> data_out == 8'h00);
  // Once the data phase is reached, a byte leaves in every cycle.
  a_send_no_gap : assert property (@(posedge clk) disable iff (!rst_n)
    state == ST_SEND |-> data_valid);
  a_idx_in_range : assert property (@(posedge clk) disable iff (!rst_n)
    counter <= LAST);

endmodule
