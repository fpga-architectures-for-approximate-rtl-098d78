// icp_controller: schedules the tracking passes of one frame over the depth
// pyramid.
//
// Tracking runs coarse to fine: level 2 (80x60), then 1 (160x120), then 0
// (320x240). At each level it starts one tracking pass (track_start pulse with
// level/iter valid), waits for the reduction to finish (pass_done), and then
// raises results_ready until the host, which solves the 6x6 system and updates
// the pose, answers with host_ack. host_converged on that ack ends the level
// early; otherwise the level ends after max_iter[level] passes. Levels whose
// level_en bit is 0, or whose max_iter is 0, are skipped entirely, which is
// the "skip pyramid levels and reduce the iteration limit" approximation.
// done pulses when the last level ends; passes counts the passes of the frame.
//
// Following the reference algorithm: three levels, coarse-to-fine order,
// iteration limits per level (10 at level 0 by default), early exit on
// convergence, level skipping. Own choices: the host handshake and the default
// limits 5 and 4 for levels 1 and 2.
// The handshake assertion at the end is disabled while rst_n is low; lint
// tools report that use of rst_n next to its use as an asynchronous reset,
// which has no effect on the circuit.
module icp_controller #(
  parameter int NLEVELS = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [NLEVELS-1:0]      level_en,
  input  logic [NLEVELS-1:0][3:0] max_iter,
  output logic                    track_start,
  output logic [1:0]              level,
  output logic [3:0]              iter,
  input  logic                    pass_done,
  output logic                    results_ready,
  input  logic                    host_ack,
  input  logic                    host_converged,
  output logic                    busy,
  output logic                    done,
  output logic [7:0]              passes
);
  typedef enum logic [2:0] {S_IDLE, S_PICK, S_RUN, S_HOST, S_NEXT} state_e;
  state_e st;
  logic [NLEVELS-1:0]      en_q;
  logic [NLEVELS-1:0][3:0] mi_q;

  assign results_ready = (st == S_HOST);
  assign busy          = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; level <= '0; iter <= '0; track_start <= 1'b0;
      done <= 1'b0; passes <= '0; en_q <= '0; mi_q <= '0;
    end else begin
      track_start <= 1'b0;
      done        <= 1'b0;
      case (st)
        S_IDLE: if (start) begin
          en_q   <= level_en;
          mi_q   <= max_iter;
          level  <= 2'(NLEVELS - 1);
          iter   <= '0;
          passes <= '0;
          st     <= S_PICK;
        end
        S_PICK: begin
          if (en_q[level] && mi_q[level] != 0) begin
            track_start <= 1'b1;
            st          <= S_RUN;
          end else begin
            st <= S_NEXT;
          end
        end
        S_RUN: if (pass_done) begin
          passes <= passes + 1'b1;
          st     <= S_HOST;
        end
        S_HOST: if (host_ack) begin
          if (host_converged || iter + 1'b1 >= mi_q[level]) begin
            st <= S_NEXT;
          end else begin
            iter        <= iter + 1'b1;
            track_start <= 1'b1;
            st          <= S_RUN;
          end
        end
        S_NEXT: begin
          iter <= '0;
          if (level == 0) begin
            done <= 1'b1;
            st   <= S_IDLE;
          end else begin
            level <= level - 1'b1;
            st    <= S_PICK;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // A pass completes only while one is outstanding.
  a_pass_in_run: assert property (@(posedge clk) disable iff (!rst_n)
    pass_done |-> st == S_RUN);

endmodule
