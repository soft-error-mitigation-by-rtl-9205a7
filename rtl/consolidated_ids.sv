// consolidated_ids -- Consolidated-IDs register.
//
// Holds, for every core of the system, the id of the last p-XACT known to be
// consolidated there. Coherence responses carry the producer's last
// consolidated id, and so do the answers to the look-up requests the slave
// sends while a consolidation waits on a producer; they arrive on the two
// `upd_*` ports.
// The node's own entry is updated when one of its p-XACTs consolidates. An
// update only ever moves an entry forward (ids are compared modulo 2**ID_W).
// The block also answers whether every dependence of a Consumer register is
// already consolidated (`all_done`) and, if not, which cores still have to
// be asked (`pending`). 16 cores x 4-bit ids is the 8 bytes the storage
// table gives; the per-core valid flags are this implementation's addition.
module consolidated_ids
  import lbra_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 init,
  input  logic [1:0]           upd_valid,
  input  core_t [1:0]          upd_core,
  input  pxid_t [1:0]          upd_id,
  input  logic                 own_valid,
  input  core_t                own_core,
  input  pxid_t                own_id,
  input  dep_vec_t             query,
  output logic                 all_done,
  output logic [NCORES-1:0]    pending,
  output dep_vec_t             ids
);
  always_comb begin
    for (int c = 0; c < NCORES; c++) pending[c] = !dep_done(query[c], ids[c]);
    all_done = (pending == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    dep_t e;   // candidate new entry
    if (!rst_n) begin
      e = '0;
      ids <= '0;
    end else if (init) begin
      e = '0;
      ids <= '0;
    end else begin
      for (int c = 0; c < NCORES; c++) begin
        if (own_valid && own_core == core_t'(c)) begin
          ids[c].valid <= 1'b1;
          ids[c].id    <= own_id;
        end else begin
          e = ids[c];
          for (int u = 0; u < 2; u++)
            if (upd_valid[u] && upd_core[u] == core_t'(c) &&
                (!e.valid || id_le(e.id, upd_id[u]))) begin
              e.valid = 1'b1;
              e.id    = upd_id[u];
            end
          ids[c] <= e;
        end
      end
    end
  end
endmodule
