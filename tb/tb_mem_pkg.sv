// tb_mem_pkg: storage shared by all memory models of a testbench.
//
// One sparse array of 64-byte blocks, indexed by block address, stands for
// the DRAM contents of every vault, so a testbench can load inputs and check
// outputs by address without caring which vault model serves them. Also
// holds counters the models update (requests seen, requests that arrived at
// a vault not owning their address).
package tb_mem_pkg;
  import nmp_pkg::*;

  block_t mem [int unsigned];
  int unsigned n_reads, n_writes, n_wrong_vault;

  function automatic block_t rd_block(addr_t a);
    int unsigned k = a >> 6;
    return mem.exists(k) ? mem[k] : '0;
  endfunction

  function automatic void wr_block(addr_t a, block_t d);
    mem[a >> 6] = d;
  endfunction

  function automatic logic [63:0] rd64(addr_t a);
    block_t b = rd_block(a);
    return b[64 * a[5:3] +: 64];
  endfunction

  function automatic void wr64(addr_t a, logic [63:0] v);
    block_t b = rd_block(a);
    b[64 * a[5:3] +: 64] = v;
    wr_block(a, b);
  endfunction

  function automatic logic [7:0] rd8(addr_t a);
    block_t b = rd_block(a);
    return b[8 * a[5:0] +: 8];
  endfunction

  function automatic void wr8(addr_t a, logic [7:0] v);
    block_t b = rd_block(a);
    b[8 * a[5:0] +: 8] = v;
    wr_block(a, b);
  endfunction
endpackage
