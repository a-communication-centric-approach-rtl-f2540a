// maeri_controller: accelerator controller of MAERI. It runs one layer mapping:
// configure the reduction tree, stream the weights, then stream the inputs step
// by step and fire the multiplier switchlets once per step.
//
// Buffers hold distribution words {last, dest_mask[N], data}. The weight buffer
// holds n_weights words sent as PKT_WEIGHT; the input buffer holds n_inputs
// words sent as PKT_INPUT, where last marks the final word of a step (one output
// per virtual neuron). Per cycle the controller sends up to DIST_BW consecutive
// words, never past the end of a step. Once a step's final word is sent, a fire
// pulse follows log2(N)+1 cycles later, when that word has reached its leaf.
// Two limits slow a step down, and both are counted as stalls:
//   * distribution: a step with more than DIST_BW words takes several cycles;
//   * reduction/collection: a wave of num_vn outputs drains at RED_BW per cycle,
//     so steps end at least ceil(num_vn/RED_BW) cycles apart.
// After the last step the controller waits for the pipeline and the collection
// unit to drain, then pulses done.
// Timing: start is taken in IDLE; cfg_load and out_clear pulse on the cycle
// after. The phase structure (configuration, weight distribution, input
// streaming) reflects the architecture's controller; the buffer word format and
// the step rules are this design's choice.
module maeri_controller
  import maeri_pkg::*;
#(
  parameter int unsigned N       = 64,
  parameter int unsigned DIST_BW = 16,
  parameter int unsigned RED_BW  = 8,
  parameter int unsigned DEPTH   = 1024,
  localparam int unsigned AW     = $clog2(DEPTH),
  localparam int unsigned EW     = 1 + N + DATA_W,   // buffer word width
  localparam int unsigned VW     = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW:0]   n_weights,
  input  logic [AW:0]   n_inputs,
  input  logic [VW-1:0] num_vn,        // from the reconfiguration controller
  output logic          cfg_load,
  output logic          out_clear,
  output logic [AW-1:0] w_raddr [DIST_BW],
  input  logic [EW-1:0] w_rdata [DIST_BW],
  output logic [AW-1:0] i_raddr [DIST_BW],
  input  logic [EW-1:0] i_rdata [DIST_BW],
  output logic          d_valid [DIST_BW],
  output pkt_kind_e     d_kind  [DIST_BW],
  output data_t         d_data  [DIST_BW],
  output logic [N-1:0]  d_mask  [DIST_BW],
  output logic          fire,
  output logic          wave,          // products of a fire enter the tree
  input  logic          collect_busy,
  output logic          busy,
  output logic          done,
  output logic [31:0]   cyc_count,
  output logic [31:0]   step_count,
  output logic [31:0]   dist_stall_count,
  output logic [31:0]   red_stall_count
);
  localparam int unsigned LEVELS = $clog2(N);
  localparam int unsigned DRAIN  = 2 * LEVELS + 6;

  typedef enum logic [2:0] {S_IDLE, S_CFG, S_WLOAD, S_STEP, S_DRAIN, S_WAIT} state_e;

  state_e          state;
  logic [AW:0]     ptr;
  logic [VW-1:0]   since_end;        // cycles since the last step-ending issue
  logic [VW-1:0]   period;           // ceil(num_vn / RED_BW), at least 1
  logic [LEVELS:0] fire_sr;
  logic [7:0]      drain_cnt;
  int unsigned     grp;              // words in this cycle's group
  logic            grp_end;          // group ends a step
  logic            hold;             // step end held back by collection bandwidth
  logic            issue;

  always_comb begin
    period = VW'((32'(num_vn) + RED_BW - 1) / RED_BW);
    if (period == 0) period = 1;
  end

  // Read the next DIST_BW words and size the group.
  always_comb begin
    grp     = 0;
    grp_end = 1'b0;
    for (int i = 0; i < DIST_BW; i++) begin
      w_raddr[i] = AW'(ptr + (AW+1)'(i));
      i_raddr[i] = AW'(ptr + (AW+1)'(i));
    end
    if (state == S_WLOAD) begin
      for (int i = 0; i < DIST_BW; i++)
        if ((ptr + (AW+1)'(i)) < n_weights) grp = i + 1;
    end else if (state == S_STEP) begin
      for (int i = 0; i < DIST_BW; i++)
        if (!grp_end && (ptr + (AW+1)'(i)) < n_inputs) begin
          grp = i + 1;
          grp_end = i_rdata[i][EW-1];
        end
    end
    hold  = (state == S_STEP) && grp_end && (since_end < period);
    issue = (grp != 0) && !hold;
    for (int i = 0; i < DIST_BW; i++) begin
      logic [EW-2:0] w;
      w = (state == S_WLOAD) ? w_rdata[i][EW-2:0] : i_rdata[i][EW-2:0];
      d_valid[i] = issue && (i < grp);
      d_kind[i]  = (state == S_WLOAD) ? PKT_WEIGHT : PKT_INPUT;
      d_data[i]  = w[DATA_W-1:0];
      d_mask[i]  = w[DATA_W +: N];
    end
  end

  assign fire = fire_sr[LEVELS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state            <= S_IDLE;
      ptr              <= '0;
      since_end        <= '1;
      fire_sr          <= '0;
      wave             <= 1'b0;
      drain_cnt        <= '0;
      cfg_load         <= 1'b0;
      out_clear        <= 1'b0;
      done             <= 1'b0;
      cyc_count        <= '0;
      step_count       <= '0;
      dist_stall_count <= '0;
      red_stall_count  <= '0;
    end else begin
      cfg_load  <= 1'b0;
      out_clear <= 1'b0;
      done      <= 1'b0;
      fire_sr   <= {fire_sr[LEVELS-1:0], (state == S_STEP) && issue && grp_end};
      wave      <= fire;
      if (since_end != '1) since_end <= since_end + 1'b1;
      if (state != S_IDLE) cyc_count <= cyc_count + 1;
      if (fire) step_count <= step_count + 1;
      unique case (state)
        S_IDLE: if (start) begin
          state            <= S_CFG;
          cfg_load         <= 1'b1;
          out_clear        <= 1'b1;
          ptr              <= '0;
          since_end        <= '1;
          cyc_count        <= '0;
          step_count       <= '0;
          dist_stall_count <= '0;
          red_stall_count  <= '0;
        end
        S_CFG: state <= S_WLOAD;
        S_WLOAD: begin
          if (issue) ptr <= ptr + (AW+1)'(grp);
          if (!issue || ptr + (AW+1)'(grp) >= n_weights) begin
            state <= S_STEP;
            ptr   <= '0;
          end
        end
        S_STEP: begin
          if (issue) begin
            ptr <= ptr + (AW+1)'(grp);
            if (grp_end) since_end <= VW'(1);
            else         dist_stall_count <= dist_stall_count + 1;
          end
          if (hold) red_stall_count <= red_stall_count + 1;
          if (grp == 0) begin
            state     <= S_DRAIN;
            drain_cnt <= '0;
          end
        end
        S_DRAIN: begin
          drain_cnt <= drain_cnt + 1'b1;
          if (drain_cnt == 8'(DRAIN)) state <= S_WAIT;
        end
        S_WAIT: if (!collect_busy) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule
