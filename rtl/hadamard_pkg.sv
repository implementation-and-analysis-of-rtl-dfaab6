// hadamard_pkg: shared constants and index functions of the 4x4 2-D forward
// Hadamard transform of H.264/AVC,
//
//     Y = H * W * H / 2,   H = [1 1 1 1; 1 1 -1 -1; 1 -1 -1 1; 1 -1 1 -1]
//
// computed by four layers of sixteen two-input adders (layers a, b, c and the
// output layer S) with no separation into row and column passes. Sample k of
// a block is row k/4, column k%4 (W0..W15 in, S0..S15 out).
//
// table1_src()/table1_sub() give, for result `idx` of layer `layer`
// (1 = a, 2 = b, 3 = c, 4 = S), the two operands taken from the layer before
// it and whether the adder subtracts. They encode the standard's four-level
// butterfly network exactly as the published algorithm table orders it.
//
// sched() gives, for the serial architectures that compute LANES results of a
// layer per cycle, which result index lane k computes in cycle j of the block.
// Where adder layers follow each other with no register in between, the lanes
// of one layer must produce exactly the operands the next layer needs in the
// same cycle; the orders below are chosen so that this holds for every
// register placement used (W+a+b+c, W+b, W+c, W+a with four lanes and W+b
// with two). The order in layer a makes the first half of the lanes adders
// and the second half subtractors, as the first adder row of the published
// 4P4S diagram is drawn, except where layers a, b and c share one stage.
// Beyond that the orders are this design's own: the source gives the
// register placements and adder counts but not the order of the operations.
package hadamard_pkg;

  // Width of one input sample (a DC coefficient from the 4x4 integer FDCT).
  // Assumed: 16 x 255 = 4080 fits a 13-bit two's complement number.
  parameter int unsigned DEF_IN_W = 13;

  // Adder layers. Layer 0 is the input block W.
  localparam int LAYER_A = 1;
  localparam int LAYER_B = 2;
  localparam int LAYER_C = 3;
  localparam int LAYER_S = 4;

  // Register placement of a pipelined architecture: bit L set means the
  // output of layer L (0 = W, 1 = a, 2 = b, 3 = c) is held in a register
  // barrier. The output layer S is never registered.
  typedef logic [3:0] regmask_t;

  // Operand `which` (0 or 1) of result idx in the given layer.
  function automatic int table1_src(int layer, int idx, int which);
    int g, m, base;
    g = idx / 4;
    m = idx % 4;
    case (layer)
      LAYER_A: begin
        // a[i] / a[8+i] = W[c + 8r] +/- W[c + 4 + 8r], i = 2c + r
        base = ((idx % 8) / 2) + 8 * (idx % 2);
        return base + 4 * which;
      end
      LAYER_B: begin
        // b[4g+m] from a[8*(g/2) + 2m] and the next one
        base = 8 * (g / 2) + 2 * m;
        return base + which;
      end
      LAYER_C: begin
        // c[4g+m] from b[4g + 2*(m%2)] and the next one
        base = 4 * g + 2 * (m % 2);
        return base + which;
      end
      default: begin
        // S[4g+m] from c[4g + 2*(m/2)] and the next one
        base = 4 * g + 2 * (m / 2);
        return base + which;
      end
    endcase
  endfunction

  // 1 if result idx of the layer is a difference, 0 if it is a sum.
  function automatic bit table1_sub(int layer, int idx);
    int g, m;
    g = idx / 4;
    m = idx % 4;
    case (layer)
      LAYER_A: return idx >= 8;
      LAYER_B: return (g == 1) || (g == 2);
      LAYER_C: return m >= 2;
      default: return (m == 1) || (m == 2);
    endcase
  endfunction

  // Result index computed by lane k in cycle j for a serial architecture with
  // the given lane count and register placement.
  function automatic int sched(regmask_t regs, int lanes, int layer, int j, int k);
    int q, s, col, j0;
    // Layers a, b and c fused into one stage ending in a register at c
    // (four lanes): a[4j..4j+3] feed four b values that feed four c values.
    if (!regs[LAYER_A] && !regs[LAYER_B] && regs[LAYER_C] && layer <= LAYER_C) begin
      s  = j / 2;
      j0 = j % 2;
      case (layer)
        LAYER_A: return 4 * j + k;
        LAYER_B: return 8 * s + 2 * j0 + (k % 2) + 4 * (k / 2);
        default: return 4 * (2 * s + k / 2) + 2 * (k % 2) + j0;
      endcase
    end
    // Otherwise each pair of lanes of layer a computes a[8s+2col] and
    // a[8s+2col+1]: the first half of the lanes always adds and the second
    // half always subtracts. When b follows a in the same stage, the same
    // pair of lanes of layer b computes b[8s+col] and b[8s+4+col] from them.
    q   = j * (lanes / 2) + k / 2;
    s   = (lanes == 2) ? q % 2 : k / 2;
    col = (lanes == 2) ? q / 2 : j;
    if (layer == LAYER_A)                     return 8 * s + 2 * col + (k % 2);
    if (layer == LAYER_B && !regs[LAYER_A])   return 8 * s + 4 * (k % 2) + col;
    // Everything else in row order; for the output layer this is the
    // order in which results leave the block.
    return lanes * j + k;
  endfunction

  // Lane that holds result idx of the layer in cycle j (-1 if none does).
  function automatic int lane_of(regmask_t regs, int lanes, int layer, int j, int idx);
    for (int k = 0; k < lanes; k++)
      if (sched(regs, lanes, layer, j, k) == idx) return k;
    return -1;
  endfunction

  // Check, at elaboration, that every fused layer finds its operands in the
  // lanes of the layer before it, cycle by cycle.
  function automatic bit sched_ok(regmask_t regs, int lanes);
    for (int layer = LAYER_B; layer <= LAYER_S; layer++)
      if (!regs[layer-1])
        for (int j = 0; j < 16 / lanes; j++)
          for (int k = 0; k < lanes; k++)
            for (int w = 0; w < 2; w++)
              if (lane_of(regs, lanes, layer - 1, j,
                          table1_src(layer, sched(regs, lanes, layer, j, k), w)) < 0)
                return 1'b0;
    return 1'b1;
  endfunction

endpackage
