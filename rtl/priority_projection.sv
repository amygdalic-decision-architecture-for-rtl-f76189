// priority_projection -- the fixed priority pi of one amygdala node.
//
// Classifier rows are totally ordered at build time: row 0 outranks row 1, row 1
// outranks row 2, and so on. Of all rows whose current class has an explicit table
// entry, the highest-ranked one decides the option. If no row has an entry, the
// combination is unmapped and the node's safe option SAFE_OPT is chosen. Together
// with sparse_lut this realises A = f o pi: pi keeps only the winning row's entry,
// f supplies its option.
//
// The resolution is a plain priority encoder over row_hit (combinational). Ports:
// row_hit / row_opt from sparse_lut; opt is the chosen option, sel_row the deciding
// row (0 when the default was taken) and used_default flags the safe route.
//
// From the architecture: the total order on rows, lower row first, and the safe
// default for unmapped inputs. The architecture folds priority into table
// construction; evaluating it every frame with an encoder is this design's choice.
module priority_projection
  import amygdala_pkg::*;
#(
  parameter int unsigned      N        = 50,
  parameter logic [OPT_W-1:0] SAFE_OPT = QC_SAFE
) (
  input  logic [N-1:0]            row_hit,
  input  logic [N-1:0][OPT_W-1:0] row_opt,
  output logic [OPT_W-1:0]        opt,
  output logic [ROW_W-1:0]        sel_row,
  output logic                    used_default
);

  always_comb begin
    opt          = SAFE_OPT;
    sel_row      = '0;
    used_default = 1'b1;
    // Walk from the lowest priority up so the highest-priority hit is kept last.
    for (int r = N - 1; r >= 0; r--) begin
      if (row_hit[r]) begin
        opt          = row_opt[r];
        sel_row      = ROW_W'(r);
        used_default = 1'b0;
      end
    end
  end

endmodule
