// mb_pipe_ctrl: macroblock (MB) pipeline scheduler of the encoder (part of the main
// controller).
//
// The encoder splits the coding of an MB into NSTAGE tasks (IME, FME, IP, EC/DB) that run
// on different MBs at the same time: in pipeline slot t, stage s works on MB t-s when
// 0 <= t-s < num_mb. A slot begins with a start pulse to every stage that has an MB and
// ends when all of them have reported done, so the slowest stage sets the slot length
// and the faster ones wait (counted in wait_cycles). A frame of N MBs takes N+NSTAGE-1
// slots. The MB-by-MB stage schedule follows the document's timing chart; the
// start/done handshake and the wait-for-all slot rule are this design's choices.
// Interface: frame_start with num_mb begins a frame; stage_start[s] pulses with
// stage_mb[s] valid while stage_act[s] is high; stage_done[s] is a one-cycle pulse from
// the stage (it may come in the same cycle as the start pulse is seen or later).
// frame_done pulses after the last slot.
module mb_pipe_ctrl #(
  parameter int NSTAGE = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              frame_start,
  input  logic [15:0]       num_mb,
  input  logic [NSTAGE-1:0] stage_done,
  output logic [NSTAGE-1:0] stage_start,
  output logic [NSTAGE-1:0] stage_act,
  output logic [15:0]       stage_mb [NSTAGE],
  output logic              busy,
  output logic              frame_done,
  output logic [15:0]       slot,
  output logic [31:0]       wait_cycles
);

  typedef enum logic [1:0] {S_IDLE, S_START, S_RUN} state_e;
  state_e state;
  logic [15:0]       nmb;
  logic [NSTAGE-1:0] fin;

  always_comb begin
    for (int s = 0; s < NSTAGE; s++) begin
      int m;
      m = int'(slot) - s;
      stage_act[s] = (state != S_IDLE) && (m >= 0) && (m < int'(nmb));
      stage_mb[s]  = stage_act[s] ? 16'(m) : 16'd0;
      stage_start[s] = (state == S_START) && stage_act[s];
    end
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; nmb <= '0; slot <= '0; fin <= '0; frame_done <= 1'b0; wait_cycles <= '0;
    end else begin
      frame_done <= 1'b0;
      case (state)
        S_IDLE: if (frame_start && num_mb != 0) begin
          nmb <= num_mb; slot <= '0; state <= S_START;
        end
        S_START: begin
          fin   <= ~stage_act | stage_done;
          state <= S_RUN;
        end
        S_RUN: begin
          logic [NSTAGE-1:0] f;
          f = fin | stage_done;
          fin <= f;
          if (&f) begin
            if (int'(slot) == int'(nmb) + NSTAGE - 2) begin
              state <= S_IDLE; frame_done <= 1'b1;
            end else begin
              slot <= slot + 16'd1; state <= S_START;
            end
          end else if (f != 0) begin
            wait_cycles <= wait_cycles + 32'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
