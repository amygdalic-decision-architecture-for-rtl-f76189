// sparse_lut -- the sparse lookup table f of one amygdala node.
//
// The full input space of the classifier grid is the product of all rows' class
// counts, far too large for a flat table, so only meaningful combinations get an
// explicit entry. In this design an entry is the pair (row, class) -> option, held
// in the parameter ENTRIES and therefore fixed when the logic is built: there is no
// write port, so no bus can alter the table at run time.
//
// How it works: each of the NUM_ENTRIES slots compares its class against the argmax
// byte of its row (one 8-bit comparator per slot, not one per row and class). The
// per-row result is then gathered: row_hit[r] says some entry of row r matched,
// row_opt[r] is that entry's option. If two valid slots name the same (row, class),
// the lower-numbered slot wins, so even a malformed table gives one answer. A slot
// whose row lies outside 0..N-1 never matches.
//
// Interface: argmax is the frame, row r in argmax[r]. Outputs are combinational;
// the node registers them after priority resolution (priority_projection). Rows that
// no entry names have constant-zero outputs: that is the sparseness, not a fault.
//
// From the architecture: a sparse table, fixed at manufacture, 8-bit class indices.
// This design's choice: the (row, class) -> option entry format, the slot count and
// the lowest-slot-wins rule for duplicate entries.
module sparse_lut
  import amygdala_pkg::*;
#(
  parameter int unsigned N           = 50,
  parameter int unsigned NUM_ENTRIES = QC_ENTRIES,
  parameter lut_entry_t [0:NUM_ENTRIES-1] ENTRIES = QC_TABLE
) (
  input  logic [N-1:0][CLS_W-1:0] argmax,
  output logic [N-1:0]            row_hit,
  output logic [N-1:0][OPT_W-1:0] row_opt
);

  logic [NUM_ENTRIES-1:0] slot_match;

  // One comparator per table slot.
  always_comb begin
    for (int e = 0; e < NUM_ENTRIES; e++) begin
      slot_match[e] = 1'b0;
      if (ENTRIES[e].valid && (int'(ENTRIES[e].row) < N))
        slot_match[e] = (argmax[ENTRIES[e].row] == ENTRIES[e].cls);
    end
  end

  // Gather per row; highest slot index is visited first so the lowest one wins.
  // The row comparison is between constants and folds away when built.
  always_comb begin
    row_hit = '0;
    row_opt = '0;
    for (int r = 0; r < N; r++) begin
      for (int e = NUM_ENTRIES - 1; e >= 0; e--) begin
        if (slot_match[e] && int'(ENTRIES[e].row) == r) begin
          row_hit[r] = 1'b1;
          row_opt[r] = ENTRIES[e].opt;
        end
      end
    end
  end

endmodule
