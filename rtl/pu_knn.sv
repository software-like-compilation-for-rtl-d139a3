// pu_knn: "KNN" processing unit (k nearest neighbours).
//
// Its configuration is one query vector of DIM elements. The shared data
// stream is a sequence of vectors of DIM elements each; vector n is the n-th
// group of DIM data tokens. For every vector the PU accumulates the squared
// Euclidean distance to the query, one element per cycle (a subtract and a
// 17x17-bit square, which maps to DSP blocks), and inserts the finished
// distance into a sorted list of the K best so far. On a tie the earlier
// vector stays ahead. After the last token it sends the indices of the K
// nearest vectors, nearest first, each as KNN_IDX_W/8 tokens, least
// significant byte first; an unused place reports all ones.
//
// From the original: k nearest vectors of the stream to the configuration
// vector, K = 3. This design's choices: elements are the low 16 bits of a
// token, as signed numbers; DIM = 4; squared Euclidean distance; the output
// format. The stream length must be a multiple of DIM. The upper 16 bits
// of each token are ignored (a lint tool reports them as unused).
module pu_knn #(
  parameter int IN_W  = 32,
  parameter int DIM   = fleet_pkg::KNN_DIM,
  parameter int K     = fleet_pkg::KNN_K,
  parameter int IDX_W = fleet_pkg::KNN_IDX_W
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            in_valid,
  input  logic [IN_W-1:0] in_data,
  input  logic            in_last,
  output logic            in_ready,
  output logic            out_valid,
  output logic [7:0]      out_data,
  input  logic            out_ready
);
  localparam int DW     = 34 + $clog2(DIM) + 1;  // distance width, never all ones
  localparam int NB     = IDX_W / 8;             // tokens per index
  localparam int NOUT   = K * NB;
  localparam int EW     = $clog2(DIM + 1);

  typedef enum logic [2:0] {S_CFG, S_DATA, S_FINISH, S_EMIT, S_DONE} state_e;
  state_e state;

  logic signed [15:0] query [DIM];     // distributed RAM
  logic [EW-1:0]      elem;
  logic [DW-1:0]      acc;
  logic [IDX_W-1:0]   vec_idx;
  logic               cand_valid;
  logic [DW-1:0]      cand_d;
  logic [IDX_W-1:0]   cand_i;
  logic [DW-1:0]      best_d [K];
  logic [IDX_W-1:0]   best_i [K];
  logic [$clog2(NOUT+1)-1:0] emit_cnt;

  logic signed [16:0] diff;
  logic [33:0]        sq;
  logic [DW-1:0]      dist_done;

  assign diff      = 17'(signed'(in_data[15:0])) - 17'(query[elem[$clog2(DIM)-1:0]]);
  assign sq        = 34'(diff * diff);
  assign dist_done = acc + DW'(sq);
  assign in_ready  = (state == S_CFG) || (state == S_DATA);
  assign out_valid = (state == S_EMIT);
  assign out_data  = best_i[32'(emit_cnt) / NB][8*(32'(emit_cnt) % NB) +: 8];

  // sorted insertion of the candidate
  int unsigned   pos;
  logic [DW-1:0]    nd [K];
  logic [IDX_W-1:0] ni [K];
  always_comb begin
    pos = K;
    for (int j = K - 1; j >= 0; j--) if (cand_d < best_d[j]) pos = j;
    for (int j = 0; j < K; j++) begin
      nd[j] = best_d[j];
      ni[j] = best_i[j];
      if (j == pos) begin
        nd[j] = cand_d;
        ni[j] = cand_i;
      end else if (j > pos) begin
        nd[j] = best_d[j-1];
        ni[j] = best_i[j-1];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_CFG;
      elem       <= '0;
      acc        <= '0;
      vec_idx    <= '0;
      cand_valid <= 1'b0;
      cand_d     <= '0;
      cand_i     <= '0;
      emit_cnt   <= '0;
      for (int j = 0; j < K; j++) begin
        best_d[j] <= '1;
        best_i[j] <= '1;
      end
    end else begin
      cand_valid <= 1'b0;
      if (cand_valid) begin
        best_d <= nd;
        best_i <= ni;
      end
      case (state)
        S_CFG: if (in_valid) begin
          query[elem[$clog2(DIM)-1:0]] <= signed'(in_data[15:0]);
          if (32'(elem) == DIM - 1) begin
            elem  <= '0;
            state <= S_DATA;
          end else begin
            elem <= elem + 1'b1;
          end
        end
        S_DATA: if (in_valid) begin
          if (32'(elem) == DIM - 1) begin
            elem       <= '0;
            acc        <= '0;
            cand_valid <= 1'b1;
            cand_d     <= dist_done;
            cand_i     <= vec_idx;
            vec_idx    <= vec_idx + 1'b1;
          end else begin
            elem <= elem + 1'b1;
            acc  <= dist_done;
          end
          if (in_last) state <= S_FINISH;
        end
        S_FINISH: state <= S_EMIT;   // the last candidate is inserted now
        S_EMIT: if (out_ready) begin
          emit_cnt <= emit_cnt + 1'b1;
          if (32'(emit_cnt) == NOUT - 1) state <= S_DONE;
        end
        default: ;
      endcase
    end
  end
endmodule
