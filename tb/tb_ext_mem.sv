// tb_ext_mem: behavioural model of the recognizer's external memory.
//
// Stands in for the SDRAM database behind the host FPGA. Dictionary, word
// lists and n-gram entries come from the formulas in tb_model_pkg; the
// active node map is an associative array written by MAP_WR requests.
// Each read is answered LAT clocks after it is accepted, in order, one
// response per clock. ready is low in one clock out of STALL_EVERY (0: never)
// to exercise back-pressure. Reads see every write accepted before them.
module tb_ext_mem
  import hmm_pkg::*;
  import tb_model_pkg::*;
#(
  parameter int LAT         = 8,
  parameter int STATES      = 1987,
  parameter int WORDS       = 64,
  parameter int STALL_EVERY = 0
) (
  input  logic     clk,
  input  logic     req_valid,
  output logic     req_ready,
  input  ext_req_t req,
  output logic     rsp_valid,
  output ext_rsp_t rsp,
  output int       n_reads,
  output int       n_writes
);
  map_ext_t map [int];
  ext_rsp_t q_data [$];
  longint   q_time [$];
  longint   cyc = 0;

  initial begin n_reads = 0; n_writes = 0; rsp_valid = 0; rsp = '0; end

  assign req_ready = (STALL_EVERY == 0) ? 1'b1 : (cyc % STALL_EVERY != 0);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (req_valid && req_ready) begin
      if (req.kind == EXT_MAP_WR) begin
        map[int'(req.addr)] = map_ext_t'(req.wdata[$bits(map_ext_t)-1:0]);
        n_writes++;
      end else begin
        ext_rsp_t r;
        r.id = req.id;
        r.data = '0;
        case (req.kind)
          EXT_DICT:   r.data = 64'(dict_rec(int'(req.addr), STATES));
          EXT_WORD:   r.data = 64'(word_rec(int'(req.addr)));
          EXT_WORD3:  r.data = 64'(word3_rec(int'(req.addr[31:16]), int'(req.addr[15:0])));
          EXT_NGRAM:  r.data = 64'(ngram_rec(int'(req.addr), WORDS));
          EXT_MAP_RD: r.data = map.exists(int'(req.addr)) ? 64'(map[int'(req.addr)]) : 64'(0);
          default:    r.data = '0;
        endcase
        q_data.push_back(r);
        q_time.push_back(cyc + LAT);
        n_reads++;
      end
    end
    rsp_valid <= 1'b0;
    if (q_time.size() > 0 && q_time[0] <= cyc) begin
      rsp_valid <= 1'b1;
      rsp       <= q_data.pop_front();
      void'(q_time.pop_front());
    end
  end
endmodule
