// amygdala_node -- one hardware arbitration node: A = f o pi, then the option pins.
//
// The node takes a complete argmax frame from the classifier grid and selects exactly
// one of M pre-wired options. sparse_lut (f) finds, per row, whether the row's class
// has an explicit entry; priority_projection (pi) keeps the highest-priority such
// row, or the safe option SAFE_OPT if there is none. The result is registered and
// decoded one-hot onto act_drive, the pins that go straight to the actuator drivers.
//
// Output bound: act_drive always has exactly one bit set. An entry whose option index
// is M or more (a table construction error) is replaced by SAFE_OPT, so no index can
// decode outside the option set. Reset also selects SAFE_OPT.
//
// Timing: the decision taken from the frame presented with frame_valid appears on
// act_drive / opt_idx one clock later, with out_valid high for that one cycle. The
// outputs hold between frames. Each frame is handled on its own: no history is kept.
//
// From the architecture: A = f o pi, one drive signal per pre-wired option, no write
// path into the table. This design's choices: the output register, reset to the safe
// option, and the replacement of out-of-range options by the safe option.
module amygdala_node
  import amygdala_pkg::*;
#(
  parameter int unsigned      N           = 50,
  parameter int unsigned      M           = QC_M,
  parameter int unsigned      NUM_ENTRIES = QC_ENTRIES,
  parameter lut_entry_t [0:NUM_ENTRIES-1] ENTRIES = QC_TABLE,
  parameter logic [OPT_W-1:0] SAFE_OPT    = QC_SAFE
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    frame_valid,
  input  logic [N-1:0][CLS_W-1:0] argmax,
  output logic [M-1:0]            act_drive,
  output logic [OPT_W-1:0]        opt_idx,
  output logic [ROW_W-1:0]        sel_row,
  output logic                    used_default,
  output logic                    out_valid
);

  if (int'(SAFE_OPT) >= M) begin : g_bad_safe
    $error("amygdala_node: SAFE_OPT must be an option of the node");
  end

  logic [N-1:0]            row_hit;
  logic [N-1:0][OPT_W-1:0] row_opt;
  logic [OPT_W-1:0]        pi_opt;
  logic [ROW_W-1:0]        pi_row;
  logic                    pi_default;
  logic [OPT_W-1:0]        next_opt;

  sparse_lut #(
    .N(N), .NUM_ENTRIES(NUM_ENTRIES), .ENTRIES(ENTRIES)
  ) u_lut (
    .argmax(argmax), .row_hit(row_hit), .row_opt(row_opt)
  );

  priority_projection #(
    .N(N), .SAFE_OPT(SAFE_OPT)
  ) u_pi (
    .row_hit(row_hit), .row_opt(row_opt),
    .opt(pi_opt), .sel_row(pi_row), .used_default(pi_default)
  );

  assign next_opt = (int'(pi_opt) < M) ? pi_opt : SAFE_OPT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      opt_idx      <= SAFE_OPT;
      sel_row      <= '0;
      used_default <= 1'b1;
      out_valid    <= 1'b0;
    end else begin
      out_valid <= frame_valid;
      if (frame_valid) begin
        opt_idx      <= next_opt;
        sel_row      <= pi_row;
        used_default <= pi_default || (int'(pi_opt) >= M);
      end
    end
  end

  always_comb begin
    act_drive = '0;
    for (int m = 0; m < M; m++)
      act_drive[m] = (int'(opt_idx) == m);
  end

  // The registered index never leaves the option set, so exactly one pin is driven.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(act_drive));

endmodule
