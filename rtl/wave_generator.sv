// wave_generator: drives the nvFF control lines and the retention clock gate.
//
// On start_store it runs the two store phases of the nvFF operating table:
//   RESET phase: Store=1 Restore=0 SET=0 RESET=1 RSWL=0
//   SET phase:   Store=1 Restore=0 SET=1 RESET=1 RSWL=1
// Each phase ends when the nvFFs report that self-write-termination has
// stopped every cell (nvff_busy low, checked from the phase's second cycle
// on), or after T_RESET_MAX / T_SET_MAX cycles, the worst-case program
// time. On start_restore it applies Store=0 Restore=1 SET=0 RESET=0 RSWL=1
// for RESTORE_CYCLES cycles. Otherwise all lines are 0 (NORMAL/RETENTION).
// done is high from the end of a sequence until the next start.
// clk_en gates the nvFF clock: on only in NORMAL mode.
// The control values are the document's table; the phase lengths and the
// done handshake are this design's choices.
`timescale 1ns / 1ps
module wave_generator
  import nvp_pkg::*;
#(
  parameter int unsigned T_RESET_MAX    = 64,
  parameter int unsigned T_SET_MAX      = 64,
  parameter int unsigned RESTORE_CYCLES = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  nvc_mode_t  mode,
  input  logic       start_store,
  input  logic       start_restore,
  input  logic       nvff_busy,
  output nvff_ctrl_t ctrl,
  output logic       clk_en,
  output logic       done,
  output logic [15:0] store_cycles  // length of the last store sequence
);

  typedef enum logic [1:0] {W_IDLE, W_RESET, W_SET, W_RESTORE} wst_t;
  wst_t        st;
  logic [15:0] cnt;


  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= W_IDLE;
      cnt          <= '0;
      done         <= 1'b0;
      store_cycles <= '0;
    end else begin
      cnt <= cnt + 1'b1;
      case (st)
        W_IDLE: begin
          cnt <= '0;
          if (start_store) begin
            st   <= W_RESET;
            done <= 1'b0;
            store_cycles <= '0;
          end else if (start_restore) begin
            st   <= W_RESTORE;
            done <= 1'b0;
          end
        end
        W_RESET: begin
          store_cycles <= store_cycles + 1'b1;
          if ((cnt >= 1 && !nvff_busy) || cnt == 16'(T_RESET_MAX - 1)) begin
            st  <= W_SET;
            cnt <= '0;
          end
        end
        W_SET: begin
          store_cycles <= store_cycles + 1'b1;
          if ((cnt >= 1 && !nvff_busy) || cnt == 16'(T_SET_MAX - 1)) begin
            st   <= W_IDLE;
            done <= 1'b1;
          end
        end
        W_RESTORE: begin
          if (cnt == 16'(RESTORE_CYCLES - 1)) begin
            st   <= W_IDLE;
            done <= 1'b1;
          end
        end
        default: st <= W_IDLE;
      endcase
    end
  end

  always_comb begin
    ctrl = '0;
    case (st)
      W_RESET:   ctrl = '{store: 1'b1, restore: 1'b0, set: 1'b0, reset: 1'b1, rswl: 1'b0};
      W_SET:     ctrl = '{store: 1'b1, restore: 1'b0, set: 1'b1, reset: 1'b1, rswl: 1'b1};
      W_RESTORE: ctrl = '{store: 1'b0, restore: 1'b1, set: 1'b0, reset: 1'b0, rswl: 1'b1};
      default:   ctrl = '0;
    endcase
    clk_en = (mode == MODE_NORMAL) && (st == W_IDLE);
  end

  // A store and a restore never overlap.
  assert property (@(posedge clk) disable iff (!rst_n) !(start_store && start_restore));

endmodule
