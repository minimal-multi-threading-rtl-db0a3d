// lsq_split: per-thread expansion of shared loads and stores.
//
// An address computed once for several threads is still an address in
// several separate memories when the threads are instances of a
// multi-execution workload. This unit, the part MMT adds to the load/store
// queue (document, Section 4.2.5 and Table 2), expands such an access into one
// access per thread of its ITID and performs them one after another:
//   - multi-threaded workload (multi_exec = 0): memory is shared, so the
//     access is performed once (as the lowest thread of the ITID) and a load's
//     value is given to every thread of the ITID;
//   - multi-execution workload: a store is written to every thread's memory,
//     a load is read from every thread's memory; if the load was kept shared
//     because the LVIP predicted identical values and the values differ, the
//     prediction was wrong: misp is raised with the load's PC, which updates
//     the LVIP and asks the core to roll back.
//
// Interface (this design's choice): in_valid/in_ready accept one access when
// the unit is idle. The memory port issues one request at a time
// (mem_req_valid/mem_req_ready, with the thread number selecting the address
// space); a load waits for mem_resp_valid before the next thread's request, a
// store does not wait. done_valid pulses for one cycle when all threads are
// served, with the loaded value of every thread in done_data.
module lsq_split
  import mmt_pkg::*;
#(
  parameter int unsigned NT      = 4,
  parameter int unsigned XLEN    = 64,
  parameter int unsigned PC_W    = 32,
  parameter int unsigned TAG_W   = 8,
  localparam int unsigned TI_W   = (NT > 1) ? $clog2(NT) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    multi_exec,
  // access from the execution engine
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [NT-1:0]           in_itid,
  input  logic                    in_store,
  input  logic [XLEN-1:0]         in_addr,
  input  logic [XLEN-1:0]         in_wdata,
  input  logic [PC_W-1:0]         in_pc,
  input  logic                    in_lvip_identical,
  input  logic [TAG_W-1:0]        in_tag,
  // memory
  output logic                    mem_req_valid,
  input  logic                    mem_req_ready,
  output logic [TI_W-1:0]         mem_req_tid,
  output logic                    mem_req_we,
  output logic [XLEN-1:0]         mem_req_addr,
  output logic [XLEN-1:0]         mem_req_wdata,
  input  logic                    mem_resp_valid,
  input  logic [XLEN-1:0]         mem_resp_data,
  // completion
  output logic                    done_valid,
  output logic [NT-1:0]           done_itid,
  output logic [TAG_W-1:0]        done_tag,
  output logic                    done_store,
  output logic [NT-1:0][XLEN-1:0] done_data,
  output logic                    misp,
  output logic [PC_W-1:0]         misp_pc
);
  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT, S_DONE} state_e;

  state_e            state_q;
  logic [NT-1:0]     itid_q, pend_q, got_q;
  logic              store_q, pred_q, shared_mem_q;
  logic [XLEN-1:0]   addr_q, wdata_q;
  logic [PC_W-1:0]   pc_q;
  logic [TAG_W-1:0]  tag_q;
  logic [NT-1:0][XLEN-1:0] data_q;
  logic [TI_W-1:0]   cur;
  logic [NT-1:0]     cur_bit;
  logic [NT-1:0]     first_itid;
  logic              differ;

  // lowest pending thread
  always_comb begin
    cur = '0;
    for (int t = NT - 1; t >= 0; t--) if (pend_q[t]) cur = TI_W'(t);
    cur_bit = NT'(1) << cur;
    first_itid = '0;
    for (int t = NT - 1; t >= 0; t--) if (in_itid[t]) first_itid = NT'(1) << t;
  end

  assign in_ready      = (state_q == S_IDLE);
  assign mem_req_valid = (state_q == S_REQ);
  assign mem_req_tid   = cur;
  assign mem_req_we    = store_q;
  assign mem_req_addr  = addr_q;
  assign mem_req_wdata = wdata_q;

  // values of the threads served, compared with each other
  always_comb begin
    differ = 1'b0;
    for (int unsigned a = 0; a < NT; a++)
      for (int unsigned b = 0; b < NT; b++)
        if (got_q[a] && got_q[b] && data_q[a] != data_q[b]) differ = 1'b1;
  end

  assign done_valid = (state_q == S_DONE);
  assign done_itid  = itid_q;
  assign done_tag   = tag_q;
  assign done_store = store_q;
  assign misp       = done_valid && !store_q && !shared_mem_q && pred_q &&
                      (itid_q & (itid_q - 1'b1)) != '0 && differ;
  assign misp_pc    = pc_q;

  always_comb begin
    for (int unsigned t = 0; t < NT; t++)
      // with shared memory the one value read is every thread's value
      done_data[t] = shared_mem_q ? data_q[cur_first(got_q)] : data_q[t];
  end

  function automatic logic [TI_W-1:0] cur_first(logic [NT-1:0] v);
    logic [TI_W-1:0] r;
    r = '0;
    for (int t = NT - 1; t >= 0; t--) if (v[t]) r = TI_W'(t);
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      itid_q       <= '0;
      pend_q       <= '0;
      got_q        <= '0;
      store_q      <= 1'b0;
      pred_q       <= 1'b1;
      shared_mem_q <= 1'b0;
      addr_q       <= '0;
      wdata_q      <= '0;
      pc_q         <= '0;
      tag_q        <= '0;
      data_q       <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (in_valid && in_itid != '0) begin
          itid_q       <= in_itid;
          pend_q       <= multi_exec ? in_itid : first_itid;
          got_q        <= '0;
          store_q      <= in_store;
          pred_q       <= in_lvip_identical;
          shared_mem_q <= !multi_exec;
          addr_q       <= in_addr;
          wdata_q      <= in_wdata;
          pc_q         <= in_pc;
          tag_q        <= in_tag;
          data_q       <= '0;
          state_q      <= S_REQ;
        end
        S_REQ: if (mem_req_ready) begin
          if (store_q) begin
            pend_q  <= pend_q & ~cur_bit;
            state_q <= ((pend_q & ~cur_bit) == '0) ? S_DONE : S_REQ;
          end else begin
            state_q <= S_WAIT;
          end
        end
        S_WAIT: if (mem_resp_valid) begin
          data_q[cur] <= mem_resp_data;
          got_q       <= got_q | cur_bit;
          pend_q      <= pend_q & ~cur_bit;
          state_q     <= ((pend_q & ~cur_bit) == '0) ? S_DONE : S_REQ;
        end
        S_DONE: state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
