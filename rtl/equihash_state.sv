// equihash_state: main controller of the miner (document's Figure 3.9).
//
// IDLE waits for the memory to be calibrated (`init_done`) and for a job
// (`uart_done`); BLAKE2B generates the items; then RADIX and COLLISION
// alternate for K stages, `stage` counting the finished collision steps;
// after the K-th collision step DONE pulses `equihash_state_done` and the
// machine returns to IDLE. Each step is started by a one-cycle pulse on
// entering its state and ends on its `*_done` pulse. `last_stage` is high
// during the K-th stage. The memory pointers come from equihash_pointer.
// `work_ack` pulses when a job is taken. The states, their order and the
// transition conditions are the document's; pulse timing is this
// design's choice. The buffer base pointers passed through from
// equihash_pointer are fixed, so some output bits are constant.
module equihash_state
  import eq_pkg::*;
#(
  parameter int K          = 9,
  parameter int BUF_WORDS  = 1 << 22,
  parameter int NUM_ITEMS  = 1 << 22,
  parameter int RADIX_PASS = 3
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               init_done,
  input  logic               uart_done,
  output logic               work_ack,
  output eq_state_e          state,
  output logic [3:0]         stage,
  output logic               last_stage,
  output logic               blake2b_start,
  input  logic               blake2b_done,
  output logic               radix_start,
  input  logic               radix_done,
  output logic               collision_start,
  input  logic               collision_done,
  input  logic [WADDR_W-1:0] collision_count,
  input  logic [WADDR_W-1:0] collision_tree_end,
  output logic               equihash_state_done,
  output logic [WADDR_W-1:0] blake2b_base_addr,
  output logic [WADDR_W-1:0] radix_base_addr,
  output logic [WADDR_W-1:0] radix_scratch_addr,
  output logic [WADDR_W-1:0] radix_end,
  output logic [WADDR_W-1:0] collision_rbase,
  output logic [WADDR_W-1:0] collision_wbase,
  output logic [WADDR_W-1:0] collision_end,
  output logic [WADDR_W-1:0] tree_addr
);
  logic [3:0] stg_ctr;
  logic       job_start;

  assign stage      = stg_ctr;
  assign last_stage = (stg_ctr == 4'(K - 1));
  assign job_start  = (state == ST_IDLE) && uart_done && init_done;
  assign work_ack   = job_start;

  always_ff @(posedge clk) begin
    if (rst) begin
      state               <= ST_IDLE;
      stg_ctr             <= '0;
      blake2b_start       <= 1'b0;
      radix_start         <= 1'b0;
      collision_start     <= 1'b0;
      equihash_state_done <= 1'b0;
    end else begin
      blake2b_start       <= 1'b0;
      radix_start         <= 1'b0;
      collision_start     <= 1'b0;
      equihash_state_done <= 1'b0;
      unique case (state)
        ST_IDLE: if (job_start) begin
          state         <= ST_BLAKE2B;
          stg_ctr       <= '0;
          blake2b_start <= 1'b1;
        end
        ST_BLAKE2B: if (blake2b_done) begin
          state       <= ST_RADIX;
          radix_start <= 1'b1;
        end
        ST_RADIX: if (radix_done) begin
          state           <= ST_COLLISION;
          collision_start <= 1'b1;
        end
        ST_COLLISION: if (collision_done) begin
          stg_ctr <= stg_ctr + 1'b1;
          if (stg_ctr == 4'(K - 1)) begin
            state               <= ST_DONE;
            equihash_state_done <= 1'b1;
          end else begin
            state       <= ST_RADIX;
            radix_start <= 1'b1;
          end
        end
        default: state <= ST_IDLE;  // ST_DONE
      endcase
    end
  end

  equihash_pointer #(
    .BUF_WORDS(BUF_WORDS), .NUM_ITEMS(NUM_ITEMS), .RADIX_PASS(RADIX_PASS)
  ) u_pointer (
    .clk, .rst, .job_start, .radix_done, .collision_done,
    .collision_count, .collision_tree_end,
    .blake2b_base_addr, .radix_base_addr, .radix_scratch_addr, .radix_end,
    .collision_rbase, .collision_wbase, .collision_end, .tree_addr);
endmodule
