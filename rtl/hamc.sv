// hamc: hierarchical-AND matching comparator.
//
// Replaces the precharged NOR match line and its sense amplifier with static
// logic: the N cell match signals of an entry are combined level by level by
// 2-input AND stages (on silicon a NAND followed by an inverter), so the
// entry matches only when every cell matches. NOR gates are avoided because
// their delay and required P/N sizing grow too large at very low supply
// voltage. Level k+1 pairs up the signals of level k; an odd one left over
// is passed on unchanged. That gives ceil(log2(N)) AND levels (6 for the
// 36-bit entry). The 2-input fan-in is this design's choice; the source says
// only that the comparator is built from AND (NAND and inverter) gates
// connected in series.
//
// Ports: in[N-1:0] cell matches, out = AND of all of them. Purely
// combinational.
module hamc #(
  parameter int unsigned N = 36
) (
  input  logic [N-1:0] in,
  output logic         out
);

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 0;

  // number of signals at level k: ceil(N / 2**k)
  function automatic int unsigned width_at(int unsigned k);
    return (N + (1 << k) - 1) >> k;
  endfunction

  for (genvar k = 0; k <= LEVELS; k++) begin : g_lvl
    logic [width_at(k)-1:0] node;
    if (k == 0) begin : g_in
      always_comb node = in;
    end else begin : g_and
      localparam int unsigned WP = width_at(k - 1);
      for (genvar j = 0; j < width_at(k); j++) begin : g_gate
        if (2 * j + 1 < WP) begin : g_pair
          // NAND followed by an inverter
          logic nand_n;
          always_comb begin
            nand_n  = ~(g_lvl[k-1].node[2*j] & g_lvl[k-1].node[2*j+1]);
            node[j] = ~nand_n;
          end
        end else begin : g_pass
          always_comb node[j] = g_lvl[k-1].node[2*j];
        end
      end
    end
  end

  always_comb out = g_lvl[LEVELS].node[0];

endmodule
