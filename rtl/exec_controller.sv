// exec_controller: stage/step sequencer of the ordered-access machine.
//
// It carries out the program-execution procedure of the machine: the number
// of stages and the number of steps (rows) of every stage are set, then
// execution starts at the first step of the first stage. Each step asks the
// data and instruction memories for one row: instructions, operands and
// result indices. Steps of one stage do not depend on each other, so one is
// issued per cycle. Before the next stage may start, the results of the
// last step must have been stored, so the sequencer waits DRAIN cycles (the
// read-execute-write latency) at the end of each stage. After the last
// stage it waits the same way and then reports done: the final data matrix
// is then complete in the data memory.
//
// The flow (set counts, load row, execute, store, last step?, last stage?)
// follows the document's execution diagram. The one-row-per-cycle issue, the
// drain wait and the interface are this design's choices.
//
// Interface: num_stages and steps[] are captured when start is seen while
// idle. Stage s reads the matrix of stage s (rows 0 .. steps[s]-1). A stage
// with zero steps takes one idle cycle and its drain. busy is high from the cycle after start
// until done; done is a one-cycle pulse; stall is high in drain cycles.
// Timing: with start in cycle 0, done is high in cycle
// 1 + sum(max(steps[s], 1)) + DRAIN * num_stages.
module exec_controller
  import poam_pkg::*;
#(
  parameter int unsigned DRAIN = 2   // cycles from last read request to stored result
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [IDX_STAGE_W-1:0] num_stages,          // stages to run (final matrix = num_stages)
  input  logic [IDX_ROW_W:0]   steps [MAX_STAGES],    // steps (rows) of each stage
  output logic                 rd_en,
  output stage_t               rd_stage,
  output row_t                 rd_row,
  output logic                 busy,
  output logic                 stall,
  output logic                 stage_end,             // pulse: a stage finished draining
  output logic                 done
);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_DRAIN} state_t;

  state_t                 state;
  logic [IDX_STAGE_W-1:0] n_stages_q;
  logic [IDX_ROW_W:0]     steps_q [MAX_STAGES];
  stage_t                 stage_q;
  logic [IDX_ROW_W:0]     row_q;
  logic [$clog2(DRAIN+1):0] drain_q;

  logic [IDX_ROW_W:0] cur_steps;
  logic               last_stage;
  assign cur_steps  = steps_q[stage_q];
  assign last_stage = ({1'b0, stage_q} + 1'b1) >= {1'b0, n_stages_q};

  always_comb begin
    rd_en    = (state == S_ISSUE) && (row_q < cur_steps);
    rd_stage = stage_q;
    rd_row   = row_t'(row_q);
    busy     = (state != S_IDLE);
    stall    = (state == S_DRAIN);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      n_stages_q <= '0;
      stage_q    <= '0;
      row_q      <= '0;
      drain_q    <= '0;
      done       <= 1'b0;
      stage_end  <= 1'b0;
      for (int unsigned s = 0; s < MAX_STAGES; s++) steps_q[s] <= '0;
    end else begin
      done      <= 1'b0;
      stage_end <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            n_stages_q <= num_stages;
            for (int unsigned s = 0; s < MAX_STAGES; s++) steps_q[s] <= steps[s];
            stage_q    <= '0;
            row_q      <= '0;
            if (num_stages == '0) done <= 1'b1;
            else                  state <= S_ISSUE;
          end
        end
        S_ISSUE: begin
          if (row_q + 1'b1 >= cur_steps) begin
            // last step of the stage issued now (or the stage is empty)
            state   <= S_DRAIN;
            drain_q <= ($clog2(DRAIN+1)+1)'(DRAIN);
          end
          row_q <= row_q + 1'b1;
        end
        S_DRAIN: begin
          if (drain_q <= 1) begin
            stage_end <= 1'b1;
            if (last_stage) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state   <= S_ISSUE;
              stage_q <= stage_q + 1'b1;
              row_q   <= '0;
            end
          end
          drain_q <= drain_q - 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial assert (DRAIN >= 1) else $error("exec_controller: DRAIN must be at least 1");

endmodule
