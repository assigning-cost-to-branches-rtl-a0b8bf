// cost_analysis_table: PC-tagged cost table for mis-predicted branches.
//
// This is the table used to show that the cost of a mis-predicted branch can
// be predicted from its past. Each of ENTRIES entries, indexed by low PC
// bits, holds the branch PC (stored as a tag of the remaining upper bits)
// and a CTR_W-bit saturating counter. At decode a branch whose PC matches its
// entry (pred_hit_o) gets the cost class of the counter; a branch that
// misses is predicted low cost. At write-back a mis-predicted branch trains
// its entry with the measured class; if the entry holds another branch it is
// first taken over (tag written, counter restarted at zero).
//
// The four counter types of the study are the four settings of KIND and
// TRACK_HIGH: up/down or up/reset counters that count high-cost branches
// (high predicted when the counter is 2 or more) or low-cost ones (high
// predicted when it is below 2). 2048 entries of 2-bit counters is the
// studied size. The tag form of the PC field and the miss behaviour are this
// design's choices.
//
// Timing: combinational prediction, update at the next clock edge; the table
// clears itself for ENTRIES cycles after reset (busy_o).
module cost_analysis_table #(
  parameter int unsigned         ENTRIES    = 2048,
  parameter int unsigned         CTR_W      = 2,
  parameter spec_pkg::ctr_kind_e KIND       = spec_pkg::CTR_UP_DOWN,
  parameter bit                  TRACK_HIGH = 1'b1,
  parameter int unsigned         PRED_THR   = 1,
  parameter int unsigned         PC_LSB     = 2,
  localparam int unsigned        IDX_W      = $clog2(ENTRIES),
  localparam int unsigned        TAG_W      = 32 - PC_LSB - IDX_W
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  output logic        busy_o,
  input  logic [31:0] pred_pc_i,
  output logic        pred_hit_o,
  output logic        pred_high_cost_o,
  input  logic        upd_valid_i,
  input  logic [31:0] upd_pc_i,
  input  logic        upd_high_cost_i
);

  typedef struct packed {
    logic             valid;
    logic [TAG_W-1:0] tag;
    logic [CTR_W-1:0] ctr;
  } entry_t;

  entry_t           mem [ENTRIES];
  logic [IDX_W-1:0] sweep_idx, p_idx, u_idx;
  logic             sweeping;
  entry_t           p_ent, u_ent;
  logic [CTR_W-1:0] u_base;
  logic [7:0]       u_next;
  logic             tracked_pred;

  assign busy_o = sweeping;
  assign p_idx  = pred_pc_i[PC_LSB +: IDX_W];
  assign u_idx  = upd_pc_i[PC_LSB +: IDX_W];
  assign p_ent  = mem[p_idx];
  assign u_ent  = mem[u_idx];

  assign pred_hit_o       = p_ent.valid && (p_ent.tag == pred_pc_i[31 -: TAG_W]);
  assign tracked_pred     = 32'(p_ent.ctr) > PRED_THR;
  assign pred_high_cost_o = pred_hit_o && (TRACK_HIGH ? tracked_pred : !tracked_pred);

  assign u_base = (u_ent.valid && u_ent.tag == upd_pc_i[31 -: TAG_W]) ? u_ent.ctr : '0;
  assign u_next = spec_pkg::ctr_next(8'(u_base), upd_high_cost_i == TRACK_HIGH, KIND, CTR_W);

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      sweeping  <= 1'b1;
      sweep_idx <= '0;
    end else if (sweeping) begin
      mem[sweep_idx] <= '0;
      sweep_idx      <= sweep_idx + 1'b1;
      if (32'(sweep_idx) == ENTRIES - 1) sweeping <= 1'b0;
    end else if (upd_valid_i) begin
      mem[u_idx] <= '{valid: 1'b1, tag: upd_pc_i[31 -: TAG_W], ctr: u_next[CTR_W-1:0]};
    end
  end

endmodule
