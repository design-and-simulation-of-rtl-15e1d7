// timing_control: the timing and control unit of the sequential multiplier.
//
// An N-bit operand has K = N/2 two-bit digits and there are K two-bit
// multipliers, so products are formed on PULSES = 2K-1 pulses (three for the
// 4-bit design). The datapath is a three-stage pipeline: a pulse captures the
// multiplier products in SR4/SR5, the next edge loads SR3 with their weighted
// sum, and the edge after that accumulates SR3 into Register2 through RCA2.
// The unit is an idle/run state machine with a cycle counter cnt:
//   idle, start high : ld (load A, B; clear the datapath), go to run, cnt = 0
//   run, cnt < PULSES            : pulse
//   run, 1 <= cnt <= PULSES      : sr3_ld with sr3_t = cnt-1
//   run, 2 <= cnt <= PULSES+1    : acc_ld
//   run, cnt = PULSES+1          : back to idle; done is high the next cycle
// start while busy is ignored. done rises on the PULSES+2 = N+1'th rising
// edge after the one that samples start (the fifth for N = 4), and a new start
// is accepted in the cycle where done is high. The overlapped schedule follows the
// published pulse-by-pulse description; the counter and the done/busy
// handshake are this design's choices.
module timing_control #(
  parameter int unsigned N  = 4,                  // operand width (even)
  parameter int unsigned TW = $clog2(N)           // pulse index width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic          ld,       // load operands, clear datapath
  output logic          pulse,    // shift SR1/SR2, capture SR4/SR5
  output logic          sr3_ld,   // load SR3
  output logic [TW-1:0] sr3_t,    // pulse index of the sum entering SR3
  output logic          acc_ld    // load Register2
);
  import mulseq_pkg::*;

  localparam int unsigned K      = N / 2;
  localparam int unsigned PULSES = 2 * K - 1;
  localparam int unsigned CW     = $clog2(PULSES + 2);

  ctrl_state_t   state;
  logic [CW-1:0] cnt;
  logic          last;

  always_comb begin
    busy   = (state == ST_RUN);
    ld     = start && (state == ST_IDLE);
    pulse  = busy && (cnt < CW'(PULSES));
    sr3_ld = busy && (cnt >= CW'(1)) && (cnt <= CW'(PULSES));
    sr3_t  = TW'(cnt - CW'(1));
    acc_ld = busy && (cnt >= CW'(2));
    last   = busy && (cnt == CW'(PULSES + 1));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state <= ST_IDLE;
      cnt   <= '0;
      done  <= 1'b0;
    end else begin
      done <= last;
      if (ld) begin
        state <= ST_RUN;
        cnt   <= '0;
      end else if (last) begin
        state <= ST_IDLE;
        cnt   <= '0;
      end else if (busy) begin
        cnt <= cnt + CW'(1);
      end
    end

  // The counter never passes the last step, and done only follows a run.
  a_cnt_range: assert property (@(posedge clk) disable iff (!rst_n)
                                cnt <= CW'(PULSES + 1));
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                done |-> !busy);
endmodule
