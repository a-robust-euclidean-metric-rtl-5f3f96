// meas_sequencer: measurement controller of the RO-PUF.
//
// It holds the three counters of the measurement path: the window timer
// (WINDOW_CYCLES system clocks, 20 ms at 50 MHz), the RO select counter that
// steps through the N_RO rings, and the sample counter that counts how many
// complete sweeps over the array have been taken. A run of NUM_SAMPLES sweeps
// is started by `start`; the rings are enabled for the whole run.
//
// For each ring:  CLEAR  select the ring, hold the counter cleared for
//                        SETTLE_CYCLES while the multiplexer output settles;
//                 GATE   open the window for exactly WINDOW_CYCLES cycles;
//                 HOLD   wait SETTLE_CYCLES so the ring-domain synchroniser
//                        has closed and the count is stable;
//                 CAP    one cycle with cap_valid, cap_idx, cap_data.
// cap_data is the counter value passed straight through (no extra register);
// it is meaningful only while cap_valid is high.
// After the last ring `sweep_done` pulses and the sequencer waits, from the
// next cycle on, until `post_busy` is low (extraction, readout and comparison
// of that sample are finished) before it starts the next sweep or, after
// NUM_SAMPLES sweeps, pulses `run_done` and returns to idle.
//
// One ring takes 2*SETTLE_CYCLES + WINDOW_CYCLES + 1 cycles. The inner/outer
// order of the two counters and the settle times are choices of this design.
`timescale 1ps / 1ps
module meas_sequencer #(
  parameter int unsigned N_RO          = 32,
  parameter int unsigned M_BITS        = 24,
  parameter int unsigned WINDOW_CYCLES = 1_000_000,
  parameter int unsigned SETTLE_CYCLES = 16,
  parameter int unsigned NUM_SAMPLES   = 255,
  localparam int unsigned SW = (N_RO > 1) ? $clog2(N_RO) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              post_busy,
  output logic              ro_en,
  output logic [SW-1:0]     sel,
  output logic              clr,
  output logic              gate,
  input  logic [M_BITS-1:0] count,
  output logic              cap_valid,
  output logic [SW-1:0]     cap_idx,
  output logic [M_BITS-1:0] cap_data,
  output logic              sweep_done,
  output logic [7:0]        sample_idx,
  output logic              busy,
  output logic              run_done
);

  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_GATE, S_HOLD, S_CAP, S_WAIT} state_e;

  state_e      state;
  logic [31:0] timer;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      timer      <= '0;
      sel        <= '0;
      sample_idx <= '0;
      clr        <= 1'b1;
      gate       <= 1'b0;
      ro_en      <= 1'b0;
    end else begin
      case (state)
        S_IDLE: begin
          clr  <= 1'b1;
          gate <= 1'b0;
          if (start) begin
            ro_en      <= 1'b1;
            sel        <= '0;
            sample_idx <= '0;
            timer      <= '0;
            state      <= S_CLEAR;
          end else begin
            ro_en <= 1'b0;
          end
        end
        S_CLEAR: begin
          clr <= 1'b1;
          if (timer >= SETTLE_CYCLES - 1) begin
            timer <= '0;
            clr   <= 1'b0;
            gate  <= 1'b1;
            state <= S_GATE;
          end else begin
            timer <= timer + 1;
          end
        end
        S_GATE: begin
          if (timer >= WINDOW_CYCLES - 1) begin
            timer <= '0;
            gate  <= 1'b0;
            state <= S_HOLD;
          end else begin
            timer <= timer + 1;
          end
        end
        S_HOLD: begin
          if (timer >= SETTLE_CYCLES - 1) begin
            timer <= '0;
            state <= S_CAP;
          end else begin
            timer <= timer + 1;
          end
        end
        S_CAP: begin
          clr <= 1'b1;
          if (sel == SW'(N_RO - 1)) begin
            state <= S_WAIT;
          end else begin
            sel   <= sel + 1'b1;
            state <= S_CLEAR;
          end
        end
        S_WAIT: begin
          if (!post_busy) begin
            if (32'(sample_idx) + 1 >= NUM_SAMPLES) begin
              ro_en <= 1'b0;
              state <= S_IDLE;
            end else begin
              sample_idx <= sample_idx + 1'b1;
              sel        <= '0;
              state      <= S_CLEAR;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign cap_valid  = (state == S_CAP);
  assign cap_idx    = sel;
  assign cap_data   = count;
  assign sweep_done = (state == S_CAP) && (sel == SW'(N_RO - 1));
  assign run_done   = (state == S_WAIT) && !post_busy && (32'(sample_idx) + 1 >= NUM_SAMPLES);
  assign busy       = (state != S_IDLE);

  initial begin
    assert (NUM_SAMPLES >= 1 && NUM_SAMPLES <= 256) else $error("NUM_SAMPLES must be 1..256");
    assert (SETTLE_CYCLES >= 1 && WINDOW_CYCLES >= 1) else $error("cycle counts must be >= 1");
  end

endmodule
