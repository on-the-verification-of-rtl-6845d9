// split_mem_model: behavioural model of a split cache memory system, for
// simulation only.
//
// Two ports on one shared memory of WORDS double words: the instruction port
// (ci) only reads, the data port (cd) reads and writes with byte enables. Each
// access keeps busy high for a random number of cycles between 0 and MAXLAT
// (drawn when the previous access ended) and ends in the cycle in which busy
// is low: read data is valid in that cycle, a write takes effect at its clock
// edge. Addresses wrap modulo WORDS. A back door port lets a testbench load
// words without going through the protocol. Assertions check that a master
// keeps its request constant during an access and never reads and writes at
// once.
module split_mem_model
  import mmu_pkg::*;
#(
  parameter int unsigned WORDS  = 8192,
  parameter int unsigned MAXLAT = 3
) (
  input  logic            clk,
  input  logic            rst,
  input  mem_req_t        ci_req,
  output mem_rsp_t        ci_rsp,
  input  mem_req_t        cd_req,
  output mem_rsp_t        cd_rsp,
  input  logic            bd_we,
  input  logic [MA_W-1:0] bd_addr,
  input  logic [MD_W-1:0] bd_data,
  output int unsigned     busy_cycles_i,   // total busy cycles seen per port
  output int unsigned     busy_cycles_d,
  output int unsigned     accesses_i,
  output int unsigned     accesses_d
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [MD_W-1:0] mem [WORDS];
  int unsigned     cnt_i, cnt_d, lat_i, lat_d;
  logic            req_i, req_d;
  mem_req_t        prev_i, prev_d;
  logic            act_i, act_d;      // access running since an earlier cycle

  assign req_i = ci_req.mr | ci_req.mw;
  assign req_d = cd_req.mr | cd_req.mw;

  assign ci_rsp.busy = req_i && (cnt_i < lat_i);
  assign cd_rsp.busy = req_d && (cnt_d < lat_d);
  assign ci_rsp.data = mem[ci_req.addr[AW-1:0]];
  assign cd_rsp.data = mem[cd_req.addr[AW-1:0]];

  initial begin
    for (int i = 0; i < int'(WORDS); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt_i <= 0; cnt_d <= 0;
      lat_i <= 0; lat_d <= 0;
      act_i <= 0; act_d <= 0;
      busy_cycles_i <= 0; busy_cycles_d <= 0;
      accesses_i <= 0; accesses_d <= 0;
    end else begin
      if (bd_we) mem[bd_addr[AW-1:0]] <= bd_data;
      if (req_i) begin
        if (ci_rsp.busy) begin
          cnt_i <= cnt_i + 1; act_i <= 1; busy_cycles_i <= busy_cycles_i + 1;
        end else begin
          cnt_i <= 0; act_i <= 0; lat_i <= $urandom_range(MAXLAT, 0);
          accesses_i <= accesses_i + 1;
        end
      end
      if (req_d) begin
        if (cd_rsp.busy) begin
          cnt_d <= cnt_d + 1; act_d <= 1; busy_cycles_d <= busy_cycles_d + 1;
        end else begin
          cnt_d <= 0; act_d <= 0; lat_d <= $urandom_range(MAXLAT, 0);
          accesses_d <= accesses_d + 1;
          if (cd_req.mw)
            for (int b = 0; b < int'(MB_W); b++)
              if (cd_req.mbw[b]) mem[cd_req.addr[AW-1:0]][8*b +: 8] <= cd_req.data[8*b +: 8];
        end
      end
      prev_i <= ci_req;
      prev_d <= cd_req;
    end
  end

  a_i_rw:   assert property (@(posedge clk) disable iff (rst) !(ci_req.mr && ci_req.mw));
  a_d_rw:   assert property (@(posedge clk) disable iff (rst) !(cd_req.mr && cd_req.mw));
  a_i_hold: assert property (@(posedge clk) disable iff (rst) act_i |-> (ci_req == prev_i));
  a_d_hold: assert property (@(posedge clk) disable iff (rst) act_d |-> (cd_req == prev_d));

endmodule
