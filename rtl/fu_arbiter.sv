// fu_arbiter: the arbiter of one functional unit (FU) in the RWW select logic.
//
// It picks at most one of N instruction-window entries for its FU, giving priority to the
// lowest index (the window keeps index 0 as the oldest entry, so this is oldest-first).
// It is a binary tree of arbiter_cell nodes: requests are OR-ed towards the root, the root
// is granted when the FU is enabled and some request reached it, and each cell steers the
// grant to its higher-priority requesting child.
//
// The RWW change sits only at the leaves, where each request is pre-conditioned with the
// FU's blocking bit "a" (its tag latch still holds a tag that has not been driven, or the
// FU-group has been limited by the reduced-tag-delay counter) and with the request's
// "type" bit b (1 = the instruction produces a register tag):
//     RWIS_EN = 0 (basic RWW): leaf request = req & ~a
//     RWIS_EN = 1 (RWIS)     : leaf request = req & ~(a & b)
// so with RWIS a non-tag-producing instruction can still use an FU whose tag is waiting.
// Masking the leaf request (rather than only the leaf grant) lets a younger
// non-tag-producing request win when an older tag-producing one is blocked.
//
// Interface: req/ptype are bit vectors over the window entries; grant is one-hot or zero;
// granted says whether any grant was given. Purely combinational.
module fu_arbiter #(
  parameter int unsigned N       = 128,
  parameter bit          RWIS_EN = 1'b1
) (
  input  logic [N-1:0] req,
  input  logic [N-1:0] ptype,
  input  logic         a,
  input  logic         enable,
  output logic [N-1:0] grant,
  output logic         granted
);
  // Heap-numbered tree: node 1 is the root, node n has children 2n and 2n+1,
  // leaves are nodes N .. 2N-1.
  logic [2*N-1:1] up;    // request travelling up
  logic [2*N-1:1] down;  // grant travelling down

  // Leaf pre-compute with the indicator (a) and type (b) bits.
  for (genvar i = 0; i < N; i++) begin : g_leaf
    if (RWIS_EN) begin : g_rwis
      assign up[N+i] = req[i] & ~(a & ptype[i]);
    end else begin : g_rww
      assign up[N+i] = req[i] & ~a;
    end
    assign grant[i] = down[N+i];
  end

  for (genvar n = 1; n < N; n++) begin : g_node
    arbiter_cell u_cell (
      .req0   (up[2*n]),
      .req1   (up[2*n+1]),
      .enable (down[n]),
      .any_req(up[n]),
      .grant0 (down[2*n]),
      .grant1 (down[2*n+1])
    );
  end

  assign down[1] = enable & up[1];
  assign granted = down[1];

  initial begin
    assert (N >= 2 && (N & (N - 1)) == 0)
      else $error("fu_arbiter: N must be a power of two, got %0d", N);
  end
endmodule
