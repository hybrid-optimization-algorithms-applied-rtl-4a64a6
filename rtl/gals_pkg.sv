// gals_pkg: types, tables and helper functions shared by the GALS system model.
//
// It holds
//   * the LFSR feedback polynomials for 4 to 19 bits (maximal-length taps),
//   * the four evaluated topologies (4-module point-to-point, 4-module star,
//     4-module mesh, 10-module star) as lists of directed links,
//   * the per-link data-transfer patterns for the three traffic scenarios
//     (A low, B medium, C burst); each pattern is six clock cycles long and a
//     '1' means "start a transfer in this cycle", read left to right,
//   * the module clock-frequency sets (4-module sets 1..3, 10-module sets 1..5),
//     given in units of 10 kHz, and the matching half periods in picoseconds.
// The polynomials, patterns and frequency sets are the published ones. The
// link directions of the star and mesh topologies, and which star module is
// the centre of the 4-module star, are this design's choice (see README).
package gals_pkg;

  timeunit 1ps;
  timeprecision 1ps;

  // ---------------------------------------------------------------- LFSR
  localparam int LFSR_MIN_W = 4;
  localparam int LFSR_MAX_W = 19;

  // Tap mask of the feedback polynomial x^n + ... + 1: bit (t-1) is set for
  // every term x^t (t = 1..n). The x^n term is always included.
  function automatic logic [31:0] lfsr_taps(input int n);
    logic [31:0] m;
    m = '0;
    case (n)
      4:  m = (32'd1 << 3)  | (32'd1 << 2);
      5:  m = (32'd1 << 4)  | (32'd1 << 2);
      6:  m = (32'd1 << 5)  | (32'd1 << 4);
      7:  m = (32'd1 << 6)  | (32'd1 << 5);
      8:  m = (32'd1 << 7)  | (32'd1 << 5)  | (32'd1 << 4)  | (32'd1 << 3);
      9:  m = (32'd1 << 8)  | (32'd1 << 4);
      10: m = (32'd1 << 9)  | (32'd1 << 6);
      11: m = (32'd1 << 10) | (32'd1 << 8);
      12: m = (32'd1 << 11) | (32'd1 << 10) | (32'd1 << 9)  | (32'd1 << 3);
      13: m = (32'd1 << 12) | (32'd1 << 11) | (32'd1 << 10) | (32'd1 << 7);
      14: m = (32'd1 << 13) | (32'd1 << 12) | (32'd1 << 11) | (32'd1 << 1);
      15: m = (32'd1 << 14) | (32'd1 << 13);
      16: m = (32'd1 << 15) | (32'd1 << 13) | (32'd1 << 12) | (32'd1 << 10);
      17: m = (32'd1 << 16) | (32'd1 << 13);
      18: m = (32'd1 << 17) | (32'd1 << 10);
      19: m = (32'd1 << 18) | (32'd1 << 17) | (32'd1 << 16) | (32'd1 << 13);
      default: m = '0;
    endcase
    return m;
  endfunction

  // ------------------------------------------------------------ topology
  typedef enum logic [1:0] {
    TOPO_P2P4   = 2'd0,   // 1 -> 2 -> 3 -> 4
    TOPO_STAR4  = 2'd1,   // three satellites around module 4
    TOPO_MESH4  = 2'd2,   // every module linked with every other one
    TOPO_STAR10 = 2'd3    // nine satellites around module 10
  } topology_e;

  typedef enum logic [1:0] {
    SCEN_A = 2'd0,        // low transfer rate (one transfer in six cycles)
    SCEN_B = 2'd1,        // medium: half of the cycles
    SCEN_C = 2'd2         // burst: more than 80 % of the cycles
  } scenario_e;

  localparam int PAT_LEN   = 6;
  localparam int MAX_MODS  = 10;
  localparam int MAX_LINKS = 9;
  localparam int MAX_PORTS = 9;    // most ports on one module (star centre)

  typedef logic [PAT_LEN-1:0] pattern_t;

  function automatic int topo_mods(input topology_e t);
    return (t == TOPO_STAR10) ? 10 : 4;
  endfunction

  function automatic int topo_links(input topology_e t);
    case (t)
      TOPO_P2P4:   return 3;
      TOPO_STAR4:  return 3;
      TOPO_MESH4:  return 6;
      default:     return 9;
    endcase
  endfunction

  // Source module (0-based) of link l.
  function automatic int link_src(input topology_e t, input int l);
    case (t)
      TOPO_P2P4:  return l;
      TOPO_STAR4: return (l < 2) ? l : 3;
      TOPO_MESH4: case (l)
                    0, 1, 2: return 0;
                    3, 4:    return 1;
                    default: return 2;
                  endcase
      default:    return (l < 4) ? 9 : l;
    endcase
  endfunction

  // Destination module (0-based) of link l.
  function automatic int link_dst(input topology_e t, input int l);
    case (t)
      TOPO_P2P4:  return l + 1;
      TOPO_STAR4: return (l < 2) ? 3 : 2;
      TOPO_MESH4: case (l)
                    0:       return 1;
                    1, 3:    return 2;
                    default: return 3;
                  endcase
      default:    return (l < 4) ? l : 9;
    endcase
  endfunction

  // Number of output (is_out=1) or input ports of module m.
  function automatic int mod_ports(input topology_e t, input int m, input bit is_out);
    int n;
    n = 0;
    for (int l = 0; l < topo_links(t); l++)
      if ((is_out ? link_src(t, l) : link_dst(t, l)) == m) n++;
    return n;
  endfunction

  // Link attached to port p (output or input side) of module m, -1 if none.
  function automatic int port_link(input topology_e t, input int m, input int p,
                                   input bit is_out);
    int k;
    k = 0;
    for (int l = 0; l < topo_links(t); l++)
      if ((is_out ? link_src(t, l) : link_dst(t, l)) == m) begin
        if (k == p) return l;
        k++;
      end
    return -1;
  endfunction

  // ------------------------------------------------------------ patterns
  function automatic pattern_t link_pattern(input topology_e t, input scenario_e s,
                                            input int l);
    pattern_t p;
    p = '0;
    if (t == TOPO_P2P4 || t == TOPO_STAR4) begin
      case (s)
        SCEN_A: case (l) 0: p = 6'b100000; 1: p = 6'b000100; default: p = 6'b000001; endcase
        SCEN_B: case (l) 0: p = 6'b110100; 1: p = 6'b101010; default: p = 6'b001110; endcase
        default: case (l) 0: p = 6'b110111; 1: p = 6'b011111; default: p = 6'b111101; endcase
      endcase
    end else if (t == TOPO_MESH4) begin
      case (s)
        SCEN_A: case (l)
          0: p = 6'b100000; 1: p = 6'b000010; 2: p = 6'b001000;
          3: p = 6'b000001; 4: p = 6'b010000; default: p = 6'b000100;
        endcase
        SCEN_B: case (l)
          0: p = 6'b010101; 1: p = 6'b111000; 2: p = 6'b001101;
          3: p = 6'b101100; 4: p = 6'b000111; default: p = 6'b011100;
        endcase
        default: case (l)
          0: p = 6'b111011; 1: p = 6'b011111; 2: p = 6'b110111;
          3: p = 6'b111110; 4: p = 6'b101111; default: p = 6'b111101;
        endcase
      endcase
    end else begin
      case (s)
        SCEN_A: case (l)
          0: p = 6'b100000; 1: p = 6'b000001; 2: p = 6'b001000;
          3: p = 6'b010000; 4: p = 6'b000010; 5: p = 6'b001000;
          6: p = 6'b001000; 7: p = 6'b100000; default: p = 6'b000100;
        endcase
        SCEN_B: case (l)
          0: p = 6'b101010; 1: p = 6'b111000; 2: p = 6'b101100;
          3: p = 6'b001011; 4: p = 6'b101010; 5: p = 6'b000111;
          6: p = 6'b100011; 7: p = 6'b101001; default: p = 6'b011100;
        endcase
        default: case (l)
          0: p = 6'b011111; 1: p = 6'b111011; 2: p = 6'b111110;
          3: p = 6'b110111; 4: p = 6'b011111; 5: p = 6'b110111;
          6: p = 6'b111110; 7: p = 6'b111011; default: p = 6'b110111;
        endcase
      endcase
    end
    return p;
  endfunction

  // Patterns of all output ports of module m, port p in bits [6p +: 6].
  function automatic logic [PAT_LEN*MAX_PORTS-1:0] mod_patterns(
      input topology_e t, input scenario_e s, input int m);
    logic [PAT_LEN*MAX_PORTS-1:0] v;
    v = '0;
    for (int p = 0; p < MAX_PORTS; p++)
      if (port_link(t, m, p, 1'b1) >= 0)
        v[PAT_LEN*p +: PAT_LEN] = link_pattern(t, s, port_link(t, m, p, 1'b1));
    return v;
  endfunction

  // --------------------------------------------------------- frequencies
  // Clock frequency of module m in units of 10 kHz (5000 = 50.00 MHz).
  // 4-module systems use sets 1..3, the 10-module star sets 1..5.
  function automatic int mod_freq_10khz(input topology_e t, input int set, input int m);
    if (t != TOPO_STAR10) begin
      case (set)
        1:       case (m) 0: return 4950;  1: return 5102; 2: return 5000; default: return 4901; endcase
        2:       case (m) 0: return 4545;  1: return 6250; 2: return 5000; default: return 4166; endcase
        default: case (m) 0: return 10000; 1: return 5000; 2: return 3333; default: return 5000; endcase
      endcase
    end else begin
      case (set)
        1: case (m)
             0: return 4902; 1: return 4808; 2: return 4717; 3: return 5102; 4: return 5208;
             5: return 5319; 6: return 4902; 7: return 4717; 8: return 4630; default: return 5000;
           endcase
        2: case (m)
             0: return 4167; 1: return 3571; 2: return 5556; 3: return 7143; 4: return 3333;
             5: return 4545; 6: return 3846; 7: return 6250; 8: return 8333; default: return 5000;
           endcase
        3: case (m)
             0: return 8333; 1: return 9091; 2: return 10000; 3: return 3125; 4: return 3333;
             5: return 10000; 6: return 8333; 7: return 3333; 8: return 3571; default: return 5000;
           endcase
        4: case (m)
             0: return 7143; 1: return 5556; 2: return 3571; 3: return 4167; 4: return 3333;
             5: return 6250; 6: return 3846; 7: return 4545; 8: return 5000; default: return 8333;
           endcase
        default: case (m)
             0: return 7143; 1: return 5556; 2: return 3571; 3: return 4167; 4: return 8333;
             5: return 6250; 6: return 3846; 7: return 4545; 8: return 5000; default: return 3333;
           endcase
      endcase
    end
  endfunction

  // Half clock period in ps for a frequency in units of 10 kHz (rounded).
  function automatic int half_period_ps(input int f_10khz);
    return (50_000_000 + f_10khz / 2) / f_10khz;
  endfunction

endpackage
