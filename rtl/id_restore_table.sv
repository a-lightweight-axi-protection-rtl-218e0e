// id_restore_table - bookkeeping of rewritten AXI IDs for one direction.
//
// Helper of axi_id_manipulator.  Requests leave with a rewritten ID; their
// responses come back with that ID and must be handed upstream with the
// original one.  The table keeps up to ENTRIES rewritten IDs in flight, each
// with the original ID it stands for and a count of outstanding
// transactions.  A request is admitted (req_ok_o) if its rewritten ID is
// already in flight for the same original ID, or if a free entry exists; it
// waits if the rewritten ID is in flight for a different original ID, because
// the two could then not be told apart on the response side.  A response is
// looked up by its ID (restored_id_o, combinational) and its last beat
// (rsp_done_i) retires one transaction of that entry.
//
// Timing: lookup and admission are combinational; the table updates on the
// clock edge of the request / response handshake.
module id_restore_table
  import axi_pu_pkg::*;
#(
  parameter int unsigned ENTRIES   = 4,
  parameter int unsigned MAX_TRANS = 8
) (
  input  logic clk_i,
  input  logic rst_ni,
  input  id_t  orig_id_i,
  input  id_t  new_id_i,
  output logic req_ok_o,
  input  logic req_done_i,
  input  id_t  rsp_id_i,
  input  logic rsp_done_i,
  output id_t  restored_id_o
);

  localparam int unsigned CntW = $clog2(MAX_TRANS + 1);

  typedef struct packed {
    logic            valid;
    id_t             new_id;
    id_t             orig_id;
    logic [CntW-1:0] cnt;
  } entry_t;

  entry_t tab_q [ENTRIES];

  logic                       hit, conflict, have_free;
  logic [$clog2(ENTRIES)-1:0] hit_idx, free_idx, rsp_idx;
  logic                       rsp_hit;

  always_comb begin
    hit = 1'b0; conflict = 1'b0; have_free = 1'b0; rsp_hit = 1'b0;
    hit_idx = '0; free_idx = '0; rsp_idx = '0;
    for (int e = ENTRIES - 1; e >= 0; e--) begin
      if (!tab_q[e].valid) begin
        have_free = 1'b1;
        free_idx  = e[$clog2(ENTRIES)-1:0];
      end else if (tab_q[e].new_id == new_id_i) begin
        if (tab_q[e].orig_id == orig_id_i) begin
          hit     = 1'b1;
          hit_idx = e[$clog2(ENTRIES)-1:0];
        end else begin
          conflict = 1'b1;
        end
      end
      if (tab_q[e].valid && tab_q[e].new_id == rsp_id_i) begin
        rsp_hit = 1'b1;
        rsp_idx = e[$clog2(ENTRIES)-1:0];
      end
    end
    req_ok_o      = hit ? (tab_q[hit_idx].cnt != CntW'(MAX_TRANS)) : (!conflict && have_free);
    restored_id_o = rsp_hit ? tab_q[rsp_idx].orig_id : rsp_id_i;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int e = 0; e < ENTRIES; e++) tab_q[e] <= '0;
    end else begin
      for (int e = 0; e < ENTRIES; e++) begin
        automatic logic inc = req_done_i && (hit ? (hit_idx == e[$clog2(ENTRIES)-1:0])
                                                 : (free_idx == e[$clog2(ENTRIES)-1:0]));
        automatic logic dec = rsp_done_i && rsp_hit && (rsp_idx == e[$clog2(ENTRIES)-1:0]);
        automatic logic [CntW-1:0] next_cnt = tab_q[e].cnt + CntW'(inc) - CntW'(dec);
        if (inc && !hit) begin
          tab_q[e].new_id  <= new_id_i;
          tab_q[e].orig_id <= orig_id_i;
        end
        if (inc || dec) begin
          tab_q[e].cnt   <= next_cnt;
          tab_q[e].valid <= (next_cnt != '0);
        end
      end
    end
  end

  initial assert (ENTRIES >= 2) else $error("ENTRIES must be at least 2");

endmodule
