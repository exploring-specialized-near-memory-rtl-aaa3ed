// vault_addr_map: physical address to vault index decoder.
//
// Two mappings are supported, chosen by a mode register bit. Scheme A
// (scheme_b = 0) is the default HMC interleave: consecutive 64-byte blocks go
// to consecutive vaults, the vault index being address bits 9:6. Scheme B
// (scheme_b = 1) keeps a whole 4 KB page in one vault so that an accelerator
// finds contiguous data in its own vault: the vault index is address bits
// 15:12. Both bit ranges are those of the architecture for a 4 GB device.
// The decoder also reports whether the address is in the vault given by
// MY_VAULT, which the tile's address generation uses to pick the local (TSV)
// path or the crossbar. Purely combinational.
module vault_addr_map
  import nmp_pkg::*;
#(
  parameter int unsigned MY_VAULT = 0
) (
  input  addr_t              addr,
  input  logic               scheme_b,
  output logic [VAULT_W-1:0] vault,
  output logic               local_hit
);
  always_comb begin
    vault     = vault_of(addr, scheme_b);
    local_hit = (vault == VAULT_W'(MY_VAULT));
  end
endmodule
