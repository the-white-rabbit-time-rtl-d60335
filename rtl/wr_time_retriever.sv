// WR time retriever: polls the UTC time of the White Rabbit node.
//
// Every TRIG_PERIOD_CYC clock cycles (20 us at the 40 MHz FPGA clock, i.e. a
// 50 kHz trigger, the fastest the node accepts) the state machine runs one
// acquisition, following the retrieval procedure of the design:
//   NORMAL  - the node is put in normal operation (wr_normal high)
//   START   - the trigger is raised (wr_trig high)
//   WAIT    - the trigger is held while waiting for the node to report that it
//             has captured its time (wr_node_ready)
//   READ    - the time is frozen (wr_freeze high) and latched
//   IDLE    - the node is left idle until the next trigger period
// The latched time appears on utc_wr with a one-cycle utc_wr_valid pulse.
// The handshake signal names, the one-cycle NORMAL/START/READ states and the
// WAIT timeout (an acquisition the node does not answer is dropped and
// counted in miss_count) are this design's choices; the state sequence and the
// 20 us period follow the design.
module wr_time_retriever
  import wr_pmu_pkg::*;
#(
  parameter int unsigned TRIG_PERIOD_CYC  = 800,  // 20 us / 25 ns
  parameter int unsigned WAIT_TIMEOUT_CYC = 600
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  // to / from the WR node
  output logic       wr_normal,
  output logic       wr_trig,
  output logic       wr_freeze,
  input  logic       wr_node_ready,
  input  pmu_time_t  wr_time,
  // to the clock discipline
  output pmu_time_t  utc_wr,
  output logic       utc_wr_valid,
  output logic [15:0] miss_count
);

  typedef enum logic [2:0] {S_IDLE, S_NORMAL, S_START, S_WAIT, S_READ} state_t;
  state_t state;

  logic [$clog2(TRIG_PERIOD_CYC)-1:0]  period_cnt;
  logic [$clog2(WAIT_TIMEOUT_CYC+1)-1:0] wait_cnt;
  logic period_tick;

  assign period_tick = (period_cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      period_cnt <= '0;
    end else if (period_cnt == ($bits(period_cnt))'(TRIG_PERIOD_CYC - 1)) begin
      period_cnt <= '0;
    end else begin
      period_cnt <= period_cnt + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      wait_cnt     <= '0;
      utc_wr       <= '0;
      utc_wr_valid <= 1'b0;
      miss_count   <= '0;
    end else begin
      utc_wr_valid <= 1'b0;
      unique case (state)
        S_IDLE:   if (enable && period_tick) state <= S_NORMAL;
        S_NORMAL: state <= S_START;
        S_START: begin
          wait_cnt <= '0;
          state    <= S_WAIT;
        end
        S_WAIT: begin
          if (wr_node_ready) begin
            state <= S_READ;
          end else if (wait_cnt == ($bits(wait_cnt))'(WAIT_TIMEOUT_CYC)) begin
            miss_count <= miss_count + 1'b1;
            state      <= S_IDLE;
          end else begin
            wait_cnt <= wait_cnt + 1'b1;
          end
        end
        S_READ: begin
          utc_wr       <= wr_time;
          utc_wr_valid <= 1'b1;
          state        <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign wr_normal = (state != S_IDLE);
  assign wr_trig   = (state == S_START) || (state == S_WAIT);
  assign wr_freeze = (state == S_READ);

  // The node must not be frozen while a trigger is pending.
  a_trig_freeze_excl: assert property (@(posedge clk) !(wr_trig && wr_freeze));

endmodule
