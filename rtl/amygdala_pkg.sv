// amygdala_pkg -- types and default tables shared by the amygdala arbitration logic.
//
// The perception side (a grid of N narrow classifiers) reports one 8-bit argmax class
// index per row. The arbitration side maps that tuple onto exactly one of M pre-wired
// actuator options. This package holds:
//   * the field widths (8-bit class index, as the 8-bit argmax encoding requires;
//     8-bit row and option indices, a choice of this design),
//   * lut_entry_t, one explicit entry of the sparse lookup table: "if row `row` reports
//     class `cls`, select option `opt`". Slots with valid = 0 are unused.
//   * a default single-node table for the industrial quality-control option set
//     {pass, reject, flag_human, halt_line}; the rows it reads and the classes it maps
//     are an example configuration of this design, not taken from a published table,
//   * the default configuration of the four-node decision DAG: option-set sizes
//     3, 3, 5 and K = 8 per node, child routing and example entries. The option-set
//     sizes follow the four-node example; the routing, the entries and K are this
//     design's choices.
package amygdala_pkg;

  localparam int unsigned CLS_W = 8;   // argmax class index, 8 bits per row
  localparam int unsigned ROW_W = 8;   // row index inside a table entry
  localparam int unsigned OPT_W = 8;   // option index inside a table entry
  localparam int unsigned NODE_W = 8;  // DAG node index

  // "no child": the selected option of a DAG node is a terminal action
  localparam logic [NODE_W-1:0] TERMINAL = '1;

  typedef struct packed {
    logic             valid;
    logic [ROW_W-1:0] row;
    logic [CLS_W-1:0] cls;
    logic [OPT_W-1:0] opt;
  } lut_entry_t;

  // Industrial quality-control option set (single-node example).
  typedef enum logic [OPT_W-1:0] {
    QC_PASS       = 8'd0,
    QC_REJECT     = 8'd1,
    QC_FLAG_HUMAN = 8'd2,
    QC_HALT_LINE  = 8'd3
  } qc_option_e;

  localparam int unsigned QC_M       = 4;
  localparam int unsigned QC_ENTRIES = 16;

  // Row order is priority order: row 0 outranks row 1, and so on.
  //   row 0: cell hazard        class 1 -> halt_line
  //   row 1: surface defect     class 1, 2 -> reject, class 3 -> flag_human
  //   row 2: orientation        class 1 -> reject
  //   row 3: completeness       class 0 -> pass, class 1 -> reject
  // Everything else falls to the safe option, flag_human.
  localparam lut_entry_t [0:QC_ENTRIES-1] QC_TABLE = '{
    '{1'b1, 8'd0, 8'd1, QC_HALT_LINE},
    '{1'b1, 8'd1, 8'd1, QC_REJECT},
    '{1'b1, 8'd1, 8'd2, QC_REJECT},
    '{1'b1, 8'd1, 8'd3, QC_FLAG_HUMAN},
    '{1'b1, 8'd2, 8'd1, QC_REJECT},
    '{1'b1, 8'd3, 8'd0, QC_PASS},
    '{1'b1, 8'd3, 8'd1, QC_REJECT},
    '{1'b0, 8'd0, 8'd0, 8'd0},
    '{1'b0, 8'd0, 8'd0, 8'd0},
    '{1'b0, 8'd0, 8'd0, 8'd0},
    '{1'b0, 8'd0, 8'd0, 8'd0},
    '{1'b0, 8'd0, 8'd0, 8'd0},
    '{1'b0, 8'd0, 8'd0, 8'd0},
    '{1'b0, 8'd0, 8'd0, 8'd0},
    '{1'b0, 8'd0, 8'd0, 8'd0},
    '{1'b0, 8'd0, 8'd0, 8'd0}
  };
  localparam logic [OPT_W-1:0] QC_SAFE = QC_FLAG_HUMAN;

  // ---------------------------------------------------------------------------
  // Four-node decision DAG.
  //   node 0  target assessment   : 0 engage, 1 hold, 2 await_confirmation
  //   node 1  threat geometry     : 0 intercept_likely, 1 intercept_unlikely, 2 abort
  //   node 2  approach maneuver   : 0 accel_right, 1 accel_left, 2 dive,
  //                                 3 afterburner, 4 abort
  //   node 3  solution select     : 0 .. K-1 pre-computed solutions s_1 .. s_K
  localparam int unsigned DAG_NODES  = 4;
  localparam int unsigned DAG_MAX_M  = 8;
  localparam int unsigned DAG_MAX_E  = 8;
  localparam int unsigned DAG_K      = 8;

  localparam int unsigned DAG_NODE_M [DAG_NODES] = '{3, 3, 5, DAG_K};

  // Safe option per node: await_confirmation, abort, abort, s_1.
  localparam logic [OPT_W-1:0] DAG_SAFE [DAG_NODES] = '{8'd2, 8'd2, 8'd4, 8'd0};

  // Child of each (node, option); TERMINAL ends the walk. Every child index is
  // larger than its parent, which makes the graph acyclic by construction.
  localparam logic [NODE_W-1:0] DAG_CHILD [DAG_NODES][DAG_MAX_M] = '{
    '{8'd1, TERMINAL, TERMINAL, TERMINAL, TERMINAL, TERMINAL, TERMINAL, TERMINAL},
    '{8'd2, TERMINAL, TERMINAL, TERMINAL, TERMINAL, TERMINAL, TERMINAL, TERMINAL},
    '{8'd3, 8'd3, 8'd3, 8'd3, TERMINAL, TERMINAL, TERMINAL, TERMINAL},
    '{TERMINAL, TERMINAL, TERMINAL, TERMINAL, TERMINAL, TERMINAL, TERMINAL, TERMINAL}
  };

  // Example entries. Each node reads the classifier rows it needs out of the one
  // shared argmax frame: node 0 rows 4..5, node 1 row 6, node 2 row 7, node 3 row 8.
  localparam lut_entry_t [0:DAG_NODES-1][0:DAG_MAX_E-1] DAG_TABLE = '{
    '{'{1'b1, 8'd4, 8'd1, 8'd1},   // row 4 class 1 -> hold
      '{1'b1, 8'd5, 8'd1, 8'd0},   // row 5 class 1 -> engage
      '{1'b1, 8'd5, 8'd2, 8'd1},   // row 5 class 2 -> hold
      '{1'b0, 8'd0, 8'd0, 8'd0}, '{1'b0, 8'd0, 8'd0, 8'd0}, '{1'b0, 8'd0, 8'd0, 8'd0},
      '{1'b0, 8'd0, 8'd0, 8'd0}, '{1'b0, 8'd0, 8'd0, 8'd0}},
    '{'{1'b1, 8'd6, 8'd0, 8'd0},   // row 6 class 0 -> intercept_likely
      '{1'b1, 8'd6, 8'd1, 8'd1},   // row 6 class 1 -> intercept_unlikely
      '{1'b0, 8'd0, 8'd0, 8'd0}, '{1'b0, 8'd0, 8'd0, 8'd0}, '{1'b0, 8'd0, 8'd0, 8'd0},
      '{1'b0, 8'd0, 8'd0, 8'd0}, '{1'b0, 8'd0, 8'd0, 8'd0}, '{1'b0, 8'd0, 8'd0, 8'd0}},
    '{'{1'b1, 8'd7, 8'd0, 8'd0},   // row 7 class 0..3 -> the four maneuvers
      '{1'b1, 8'd7, 8'd1, 8'd1},
      '{1'b1, 8'd7, 8'd2, 8'd2},
      '{1'b1, 8'd7, 8'd3, 8'd3},
      '{1'b0, 8'd0, 8'd0, 8'd0}, '{1'b0, 8'd0, 8'd0, 8'd0},
      '{1'b0, 8'd0, 8'd0, 8'd0}, '{1'b0, 8'd0, 8'd0, 8'd0}},
    '{'{1'b1, 8'd8, 8'd0, 8'd0},   // row 8 class c -> solution c, c = 0..7
      '{1'b1, 8'd8, 8'd1, 8'd1},
      '{1'b1, 8'd8, 8'd2, 8'd2},
      '{1'b1, 8'd8, 8'd3, 8'd3},
      '{1'b1, 8'd8, 8'd4, 8'd4},
      '{1'b1, 8'd8, 8'd5, 8'd5},
      '{1'b1, 8'd8, 8'd6, 8'd6},
      '{1'b1, 8'd8, 8'd7, 8'd7}}
  };

endpackage
