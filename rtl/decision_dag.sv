// decision_dag -- a directed acyclic graph of amygdala nodes with hardware routing.
//
// For domains where one lookup is not enough, several amygdala nodes are chained:
// each node selects one option from its own pre-wired option set, and that option
// names either a child node or a terminal action. Every node is an amygdala_node with
// its own table (NODE_ENTRIES[v]), option count (NODE_M[v]) and safe option
// (NODE_SAFE[v]); all nodes read the same argmax frame, each through the rows its
// entries name. The routing table CHILD[v][o] gives the child of option o at node v,
// or TERMINAL.
//
// How it works: all nodes decide in parallel in the first clock after frame_valid.
// A combinational walk then starts at node ROOT and follows CHILD for at most NODES
// steps; the node where it stops and the option chosen there are registered in the
// second clock as final_node / final_opt. action is the same result one-hot over the
// union of all option sets (node v's options occupy bits OFFSET(v) .. OFFSET(v) +
// NODE_M[v] - 1), so exactly one action bit is ever set. visited marks the nodes on
// the path.
//
// Acyclicity is enforced when the logic is built: every child index must be larger
// than its parent's, or the build stops with an error. This bounds the walk.
//
// Timing: frame_valid in cycle t, node decisions in t+1, final result and out_valid
// in t+2. Reset selects ROOT's safe option.
//
// From the architecture: nodes with their own option sets, routing by the selected
// option, the final action bounded by the union of the option sets, and the default
// node sizes 3, 3, 5, K. This design's choices: parallel evaluation with a walk,
// K = 8, the routing table, the rows each node reads, the safe options, and the
// build-time acyclicity check. The per-node option pins of each amygdala_node are
// left unused here (lint reports them): the DAG's one-hot action output takes their
// place.
module decision_dag
  import amygdala_pkg::*;
#(
  parameter int unsigned      N         = 50,
  parameter int unsigned      NODES     = DAG_NODES,
  parameter int unsigned      MAX_M     = DAG_MAX_M,
  parameter int unsigned      MAX_E     = DAG_MAX_E,
  parameter int unsigned      NODE_M    [NODES]        = DAG_NODE_M,
  parameter logic [OPT_W-1:0] NODE_SAFE [NODES]        = DAG_SAFE,
  parameter logic [NODE_W-1:0] CHILD    [NODES][MAX_M] = DAG_CHILD,
  parameter lut_entry_t [0:NODES-1][0:MAX_E-1] NODE_ENTRIES = DAG_TABLE,
  parameter int unsigned      ROOT      = 0,
  // Width of the union of all option sets; must equal the sum of NODE_M.
  parameter int unsigned      TOTAL_M   = 3 + 3 + 5 + DAG_K
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    frame_valid,
  input  logic [N-1:0][CLS_W-1:0] argmax,
  output logic [TOTAL_M-1:0]      action,
  output logic [NODE_W-1:0]       final_node,
  output logic [OPT_W-1:0]        final_opt,
  output logic [NODES-1:0]        visited,
  output logic                    out_valid
);

  function automatic int unsigned offset_of(int unsigned v);
    int unsigned s = 0;
    for (int unsigned i = 0; i < v; i++) s += NODE_M[i];
    return s;
  endfunction

  function automatic bit routing_ok();
    for (int unsigned v = 0; v < NODES; v++)
      for (int unsigned o = 0; o < MAX_M; o++)
        if (CHILD[v][o] != TERMINAL && (int'(CHILD[v][o]) <= int'(v) || int'(CHILD[v][o]) >= NODES))
          return 1'b0;
    return 1'b1;
  endfunction

  if (offset_of(NODES) != TOTAL_M) begin : g_bad_total
    $error("decision_dag: TOTAL_M must equal the sum of NODE_M");
  end
  if (!routing_ok()) begin : g_bad_routing
    $error("decision_dag: every child index must exceed its parent's");
  end
  if (ROOT >= NODES) begin : g_bad_root
    $error("decision_dag: ROOT out of range");
  end

  logic [NODES-1:0][OPT_W-1:0] node_opt;
  logic [NODES-1:0]            node_valid;

  for (genvar v = 0; v < NODES; v++) begin : g_node
    logic [NODE_M[v]-1:0] drive;
    logic [ROW_W-1:0]     sel_row;
    logic                 used_default;
    amygdala_node #(
      .N(N), .M(NODE_M[v]), .NUM_ENTRIES(MAX_E),
      .ENTRIES(NODE_ENTRIES[v]), .SAFE_OPT(NODE_SAFE[v])
    ) u_node (
      .clk(clk), .rst_n(rst_n), .frame_valid(frame_valid), .argmax(argmax),
      .act_drive(drive), .opt_idx(node_opt[v]), .sel_row(sel_row),
      .used_default(used_default), .out_valid(node_valid[v])
    );
  end

  // Routing walk over the registered node decisions.
  logic [NODE_W-1:0] walk_node;
  logic [OPT_W-1:0]  walk_opt;
  logic [NODES-1:0]  walk_visited;

  always_comb begin
    int  cur;
    bit  done;
    cur          = int'(ROOT);
    done         = 1'b0;
    walk_node    = NODE_W'(ROOT);
    walk_opt     = node_opt[ROOT];
    walk_visited = '0;
    for (int step = 0; step < NODES; step++) begin
      if (!done) begin
        walk_visited[cur] = 1'b1;
        walk_node         = NODE_W'(cur);
        walk_opt          = node_opt[cur];
        if (int'(node_opt[cur]) >= MAX_M || CHILD[cur][int'(node_opt[cur])] == TERMINAL)
          done = 1'b1;
        else
          cur = int'(CHILD[cur][int'(node_opt[cur])]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      final_node <= NODE_W'(ROOT);
      final_opt  <= NODE_SAFE[ROOT];
      visited    <= '0;
      out_valid  <= 1'b0;
    end else begin
      out_valid <= node_valid[ROOT];
      if (node_valid[ROOT]) begin
        final_node <= walk_node;
        final_opt  <= walk_opt;
        visited    <= walk_visited;
      end
    end
  end

  always_comb begin
    action = '0;
    for (int unsigned v = 0; v < NODES; v++)
      for (int unsigned o = 0; o < NODE_M[v]; o++)
        if (int'(final_node) == int'(v) && int'(final_opt) == int'(o))
          action[offset_of(v) + o] = 1'b1;
  end

  a_one_action: assert property (@(posedge clk) disable iff (!rst_n) $onehot(action));

endmodule
