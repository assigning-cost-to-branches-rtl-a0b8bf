// ctr_table: a table of saturating counters with one prediction read port and
// one read-modify-write update port.
//
// This is the common storage of every predictor and estimator in the
// speculation-control unit. The prediction port reads rd_idx_i
// combinationally. The update port reads the counter at upd_idx_i and, on
// upd_valid_i, writes back spec_pkg::ctr_next of it at the next clock edge
// (upd_up_i = tracked event). A read and an update of the same entry in one
// cycle return the old value.
//
// After reset the table clears itself one entry per cycle to INIT, with
// busy_o high for ENTRIES cycles; updates are ignored meanwhile. This lets
// the storage map onto a single-write-port RAM instead of ENTRIES resettable
// registers. The sweep and the INIT values are this design's choice.
module ctr_table #(
  parameter int unsigned         ENTRIES = 16,
  parameter int unsigned         CTR_W   = 2,
  parameter spec_pkg::ctr_kind_e KIND    = spec_pkg::CTR_UP_DOWN,
  parameter logic [7:0]          INIT    = 8'd0,
  localparam int unsigned        IDX_W   = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  output logic             busy_o,
  input  logic [IDX_W-1:0] rd_idx_i,
  output logic [CTR_W-1:0] rd_ctr_o,
  input  logic             upd_valid_i,
  input  logic [IDX_W-1:0] upd_idx_i,
  input  logic             upd_up_i
);

  logic [CTR_W-1:0] mem [ENTRIES];
  logic [IDX_W-1:0] sweep_idx;
  logic             sweeping;
  logic [CTR_W-1:0] upd_ctr;
  logic [7:0]       nxt;

  assign busy_o    = sweeping;
  assign rd_ctr_o  = mem[rd_idx_i];
  assign upd_ctr   = mem[upd_idx_i];

  always_comb begin
    nxt = spec_pkg::ctr_next(8'(upd_ctr), upd_up_i, KIND, CTR_W);
  end

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      sweeping  <= 1'b1;
      sweep_idx <= '0;
    end else if (sweeping) begin
      mem[sweep_idx] <= INIT[CTR_W-1:0];
      sweep_idx      <= sweep_idx + 1'b1;
      if (32'(sweep_idx) == ENTRIES - 1) sweeping <= 1'b0;
    end else if (upd_valid_i) begin
      mem[upd_idx_i] <= nxt[CTR_W-1:0];
    end
  end

endmodule
