// fleet_pkg: types and constants shared by the streaming accelerator.
//
// The accelerator is a connectivity shell that feeds many identical
// processing units (PUs) through a narrow, latency-insensitive PU IO
// interface. Each PU kind fixes the width of its input tokens, how many
// configuration tokens it takes before the shared data stream, and how many
// 8-bit output tokens it produces at the end of the stream. The functions
// below give those numbers per kind, so the shell and the slots size
// themselves from one place.
//
// PU IO interface, per slot (all bits cross a register block):
//   shell -> PU : in_data[IN_W], in_valid, in_last, out_ready, pu_rst
//   PU -> shell : in_ready, out_data[8], out_valid
// That is IN_W + 8 data bits, five handshake/control bits and one reset
// bit: 46 bits for 32-bit input tokens and 22 bits for 8-bit ones, the two
// interface sizes of the original design. Which five control bits are used
// is this design's choice.
package fleet_pkg;

  typedef enum logic [2:0] {
    PU_SUMMER  = 3'd0,
    PU_DOT     = 3'd1,
    PU_COUNTER = 3'd2,
    PU_KNN     = 3'd3,
    PU_TSP     = 3'd4
  } pu_kind_e;

  localparam int MEM_W       = 32;  // memory word width
  localparam int OUT_W       = 8;   // PU output token width
  localparam int CTRL_BITS   = 5;   // in_valid, in_last, out_ready, in_ready, out_valid
  localparam int RST_BITS    = 1;   // pu_rst
  localparam int REG_STAGES  = 2;   // register pair per bit in each register block
  localparam int LI_LAT      = 2 * REG_STAGES; // grant-to-arrival latency, cycles
  localparam int LI_DEPTH    = 8;   // receive buffer depth on each side
  localparam int P2S_W       = 1 + OUT_W + 1;  // in_ready, out_data, out_valid

  // PU-specific constants
  localparam int KNN_K       = 3;   // k nearest vectors
  localparam int KNN_DIM     = 4;   // elements per vector
  localparam int KNN_IDX_W   = 16;  // width of a reported vector index
  localparam int TSP_K       = 7;   // history length / LUT inputs
  localparam int CNT_W       = 16;  // width of one counter entry

  function automatic int in_width(pu_kind_e k);
    case (k)
      PU_COUNTER, PU_TSP: return 8;
      default:            return 32;
    endcase
  endfunction

  function automatic int tokens_per_word(pu_kind_e k);
    return MEM_W / in_width(k);
  endfunction

  // configuration memory words per PU
  function automatic int cfg_words(pu_kind_e k);
    case (k)
      PU_KNN:  return KNN_DIM;                    // the query vector
      PU_TSP:  return 6;  // 8 coefficient tokens (7 used) + 16 LUT tokens
      default: return 1;
    endcase
  endfunction

  function automatic int cfg_tokens(pu_kind_e k);
    return cfg_words(k) * tokens_per_word(k);
  endfunction

  // output tokens per PU per job
  function automatic int out_len(pu_kind_e k);
    case (k)
      PU_COUNTER: return 256 * (CNT_W / OUT_W);
      PU_KNN:     return KNN_K * (KNN_IDX_W / OUT_W);
      default:    return 4;   // one 32-bit result, least significant byte first
    endcase
  endfunction

  function automatic int s2p_width(pu_kind_e k);
    return in_width(k) + 3 + RST_BITS;  // data, in_valid, in_last, out_ready, pu_rst
  endfunction

  // total interface width: data bits, control bits and the reset bit
  function automatic int if_width(pu_kind_e k);
    return in_width(k) + OUT_W + CTRL_BITS + RST_BITS;
  endfunction

endpackage
