// sas_control_unit: acquisition and readout control of the SAS.
//
// Acquisition. The unit idles until a rising edge of `trigger` (the th0
// comparator). It then copies the time stamp into a new record of the
// digital FIFO and dispatches the sampling clock to the next analogue FIFO
// unit in circular order; if that unit still holds unread data, all units do
// and the trigger is discarded (`trig_discard` pulses). When the 20th cell is
// written (100 ns), the trigger level and the 3-bit th1 class are stored in
// the record. With the trigger low, sampling ends at the 32nd cell (160 ns)
// and the record is complete. With the trigger high, sampling continues
// without a gap in the 128-cell unit, and the record completes after its last
// cell; the trigger is checked once more at cell LONG_CHECK_CELL. If the
// 128-cell unit still holds an unread transient, sampling stops after 32
// cells and the record says so (`long_busy`). Trigger edges that arrive while
// an acquisition runs are ignored.
//
// Readout. `request` and `ack` follow a two-phase protocol: every transition
// of either wire is one action. When a complete record is at the head of the
// digital FIFO and no request is open, `request` toggles; the record and its
// samples stay valid until `ack` toggles back to the same level, which pops
// the record and frees its analogue unit(s) for new triggers.
//
// The chip implements this unit as self-timed logic built from Muller
// C-gates; here it is clocked by the same 200 MHz clock the chip dispatches
// to the samplers, and "dispatching the clock" is a clock enable per unit.
// `trigger`, `th1` and `ack` pass two-flop synchronizers; from a trigger edge
// to the first sample takes 4 clock cycles.
module sas_control_unit
  import sas_pkg::*;
#(
  parameter int unsigned CELLS           = 32,
  parameter int unsigned CHECK_CELL      = 20,
  parameter int unsigned LONG_CELLS      = 128,
  parameter int unsigned LONG_CHECK_CELL = 116,
  parameter int unsigned FIFO_UNITS      = 4,
  parameter int unsigned DFIFO_DEPTH     = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       trigger,
  input  logic [2:0]                 th1,
  // clock dispatch to the samplers
  output logic [FIFO_UNITS-1:0]      fifo_wr_en,
  output logic [FIFO_UNITS-1:0]      fifo_wr_start,
  output logic                       long_wr_en,
  output logic                       long_wr_start,
  // digital FIFO
  output logic                       df_alloc,
  output logic [UNIT_W-1:0]          df_unit,
  output logic                       df_set_class,
  output logic [2:0]                 df_cls,
  output logic                       df_status1,
  output logic                       df_set_long,
  output logic                       df_long_used,
  output logic                       df_long_busy,
  output logic                       df_status2,
  output logic                       df_commit,
  output logic                       df_pop,
  input  record_t                    df_head,
  input  logic [$clog2(DFIFO_DEPTH):0] df_count,
  // readout handshake
  output logic                       request,
  input  logic                       ack,
  output logic                       trig_discard
);

  typedef enum logic [1:0] {S_IDLE, S_SHORT, S_LONG} state_t;

  localparam int unsigned CW = $clog2(LONG_CELLS > CELLS ? LONG_CELLS : CELLS);

  state_t                state;
  logic [CW-1:0]         cnt;
  logic [UNIT_W-1:0]     cur, next_unit;
  logic [FIFO_UNITS-1:0] unit_busy;
  logic                  long_busy_q;
  logic                  status1_q, status2_q;

  logic [2:0] trig_sr;
  logic [2:0] th1_s1, th1_s;
  logic [2:0] ack_sr;
  logic       trig_rise, trig_s, ack_ev, ack_s, open_req;

  assign trig_s    = trig_sr[1];
  assign trig_rise = trig_sr[1] && !trig_sr[2];
  assign ack_s     = ack_sr[1];
  assign ack_ev    = ack_sr[1] != ack_sr[2];
  assign open_req  = request != ack_s;

  wire at_check      = (state == S_SHORT) && (cnt == CW'(CHECK_CELL - 1));
  wire at_short_end  = (state == S_SHORT) && (cnt == CW'(CELLS - 1));
  wire at_long_check = (state == S_LONG)  && (cnt == CW'(LONG_CHECK_CELL - 1));
  wire at_long_end   = (state == S_LONG)  && (cnt == CW'(LONG_CELLS - 1));
  wire start_acq     = (state == S_IDLE) && trig_rise && !unit_busy[next_unit];
  wire go_long       = at_short_end && status1_q && !long_busy_q;

  // ---------------------------------------------------------------- outputs
  always_comb begin
    fifo_wr_en    = '0;
    fifo_wr_start = '0;
    if (state == S_SHORT) begin
      fifo_wr_en[cur]    = 1'b1;
      fifo_wr_start[cur] = (cnt == '0);
    end
    long_wr_en    = (state == S_LONG);
    long_wr_start = (state == S_LONG) && (cnt == '0);

    df_alloc     = start_acq;
    df_unit      = next_unit;
    df_set_class = at_check;
    df_cls       = th1_s;
    df_status1   = trig_s;
    df_set_long  = (at_short_end && status1_q) || at_long_end;
    df_long_used = at_long_end;
    df_long_busy = at_short_end && status1_q && long_busy_q;
    df_status2   = at_long_end && (LONG_CHECK_CELL == LONG_CELLS ? trig_s : status2_q);
    df_commit    = (at_short_end && !go_long) || at_long_end;
    df_pop       = ack_ev;
    trig_discard = (state == S_IDLE) && trig_rise && unit_busy[next_unit];
  end

  // ------------------------------------------------------------- sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      cnt         <= '0;
      cur         <= '0;
      next_unit   <= '0;
      unit_busy   <= '0;
      long_busy_q <= 1'b0;
      status1_q   <= 1'b0;
      status2_q   <= 1'b0;
      trig_sr     <= '0;
      th1_s1      <= '0;
      th1_s       <= '0;
      ack_sr      <= '0;
      request     <= 1'b0;
    end else begin
      trig_sr <= {trig_sr[1:0], trigger};
      th1_s1  <= th1;
      th1_s   <= th1_s1;
      ack_sr  <= {ack_sr[1:0], ack};

      // storage freed by an acknowledged readout
      if (ack_ev) begin
        unit_busy[df_head.unit] <= 1'b0;
        if (df_head.long_used) long_busy_q <= 1'b0;
      end

      unique case (state)
        S_IDLE: begin
          if (start_acq) begin
            unit_busy[next_unit] <= 1'b1;
            cur       <= next_unit;
            next_unit <= (next_unit == UNIT_W'(FIFO_UNITS - 1)) ? '0 : next_unit + 1'b1;
            cnt       <= '0;
            state     <= S_SHORT;
          end
        end
        S_SHORT: begin
          cnt <= cnt + 1'b1;
          if (at_check) status1_q <= trig_s;
          if (at_short_end) begin
            cnt <= '0;
            if (go_long) begin
              long_busy_q <= 1'b1;
              state       <= S_LONG;
            end else begin
              state       <= S_IDLE;
            end
          end
        end
        S_LONG: begin
          cnt <= cnt + 1'b1;
          if (at_long_check) status2_q <= trig_s;
          if (at_long_end) begin
            cnt   <= '0;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase

      // two-phase request: one transition per complete head record
      if (!ack_ev && !open_req && df_count != '0) request <= !request;
    end
  end

  // An ack transition answers an open request, and only then.
  a_ack_answers_request: assert property (@(posedge clk) disable iff (!rst_n)
    ack_ev |-> (ack_sr[2] != request) && (df_count != '0));

endmodule
