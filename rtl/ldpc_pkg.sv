// ldpc_pkg: constants, types and configuration tables shared by the (3,k)-regular
// partly parallel LDPC decoder.
//
// The decoder has k*k PE blocks PE(x,y) (x = row, y = column, both 0-based here),
// 3k check node units and three shuffle networks. Messages are 5-bit sign-magnitude
// values (sign bit + 4 magnitude bits, as in the source architecture); hybrid data is
// 6 bits: {hard decision, sign, magnitude[3:0]}. The bit order inside the hybrid word,
// the quantisation step and all configuration tables below are this design's choices.
//
// Quantisation: one LSB of every message stands for 0.25 in the log-likelihood domain.
// The f() table is LUT[m] = min(15, round(f(m/4) * 4)), f(x) = ln((1+e^-x)/(1-e^-x)),
// with LUT[0] = 15 (f(0) is infinite).
//
// Configuration: t_xy are the start values of the third address generators, picked at
// random under the two constraints that keep the Tanner graph free of 4-cycles:
//   (1) for fixed x, t(x,y) differ for all y;
//   (2) for fixed y, t(x1,y) - t(x2,y) != (x1-x2)*(y+1) mod L for x1 != x2 (0-based x, y).
// R_x and C_y are fixed random permutations of k elements used by the intra-row and
// intra-column stages of the third shuffle network. The per-cycle control words of
// that network (ROM R and ROM C) are generated by rom_word() from a seed.
// Lint of a module that does not use every table reports those tables as unused;
// they are all used by the shuffle network.
package ldpc_pkg;

  localparam int K     = 6;    // check node degree k; variable node degree is 3
  localparam int MSG_W = 5;    // sign-magnitude message width
  localparam int MAG_W = 4;    // message magnitude width
  localparam int HYB_W = 6;    // hard decision + message
  localparam int SUM_W = 6;    // saturated magnitude sum presented to the f() LUT

  typedef logic [MSG_W-1:0] msg_t;  // {sign, magnitude}
  typedef logic [HYB_W-1:0] hyb_t;  // {hard decision, sign, magnitude}

  // Decoder phase as seen by the PE blocks.
  typedef enum logic [2:0] {
    PH_IDLE = 3'd0,
    PH_INIT = 3'd1,   // intrinsic -> extrinsic initialisation (VNU with zero inputs)
    PH_CNP  = 3'd2,   // check node processing
    PH_VNP  = 3'd3,   // variable node processing
    PH_DONE = 3'd4
  } phase_t;

  // Start values t(x,y) of AG(3) for L = 256 (row x, column y, 0-based).
  function automatic int t_xy(int x, int y);
    int t [K][K];
    t = '{
    '{ 57, 113, 145, 157, 204,  50},
    '{ 85, 172, 149,  35, 169, 197},
    '{ 82, 205, 239, 178,  33,  14},
    '{187, 235, 172, 142, 217,  36},
    '{172, 219,   1,  42, 164, 133},
    '{248,  22,  52,  78,  61, 153}
    };
    return t[x][y];
  endfunction

  // Intra-row permutations: output position y of row x takes input R_PERM[x][y].
  localparam int R_PERM [K][K] = '{
    '{5, 4, 2, 0, 3, 1},
    '{3, 4, 1, 2, 0, 5},
    '{2, 5, 1, 3, 4, 0},
    '{5, 1, 4, 2, 3, 0},
    '{1, 4, 3, 5, 2, 0},
    '{4, 1, 5, 2, 3, 0}
  };

  // Intra-column permutations: output row x of column y takes input row C_PERM[y][x].
  localparam int C_PERM [K][K] = '{
    '{5, 0, 3, 2, 4, 1},
    '{3, 0, 2, 4, 1, 5},
    '{3, 2, 0, 4, 1, 5},
    '{0, 3, 4, 2, 1, 5},
    '{4, 0, 3, 5, 1, 2},
    '{2, 5, 1, 4, 0, 3}
  };

  localparam int ROM_R_SEED = 32'h1234_5678;
  localparam int ROM_C_SEED = 32'h0BAD_F00D;

  // Start value of AG(2): ((x-1)*y) mod L with the 1-based x, y of the H2 construction.
  function automatic int ag2_start(int x, int y, int l);
    return (x * (y + 1)) % l;
  endfunction

  // Control word r of ROM R / ROM C: k bits of a 32-bit xorshift sequence.
  function automatic logic [K-1:0] rom_word(int seed, int r);
    logic [31:0] s;
    s = seed ^ (r * 32'h9E37_79B9);
    for (int i = 0; i < 3; i++) begin
      s = s ^ (s << 13);
      s = s ^ (s >> 17);
      s = s ^ (s << 5);
    end
    return s[K-1:0];
  endfunction

  // f(x) table in the 0.25-LSB fixed-point format described above.
  function automatic logic [MAG_W-1:0] f_lut(logic [SUM_W-1:0] m);
    case (m)
      6'd0:  return 4'd15;
      6'd1:  return 4'd8;
      6'd2:  return 4'd6;
      6'd3:  return 4'd4;
      6'd4:  return 4'd3;
      6'd5:  return 4'd2;
      6'd6:  return 4'd2;
      6'd7, 6'd8, 6'd9, 6'd10, 6'd11: return 4'd1;
      default: return 4'd0;
    endcase
  endfunction

  // Sign-magnitude (5 bit) to two's complement (5 bit).
  function automatic logic signed [MSG_W-1:0] sm2tc(msg_t v);
    logic signed [MSG_W-1:0] mag;
    mag = $signed({1'b0, v[MAG_W-1:0]});
    return v[MSG_W-1] ? -mag : mag;
  endfunction

endpackage
