// tlb: data TLB with address space IDs and page keys.
//
// A fully associative table of ENTRIES translations. Each entry maps a
// virtual page of one address space (ASID) to a physical page and carries a
// read and a write permission and a page key. The page key rights register
// (PKR) holds two bits per key, bit 2k = access disable and bit 2k+1 = write
// disable, so one register write changes the rights of every page with that
// key. A lookup hits when an entry is valid, its ASID equals the current
// ASID and its VPN matches; a load needs R and no access disable, a store
// needs W and neither disable bit. An address above the 39-bit virtual range
// always faults. In Metal mode the TLB is bypassed and the virtual address is
// used as the physical address, which gives mroutines direct physical memory
// access. Entries are written only by the tlbw Metal instruction (one entry
// per cycle, index chosen by software); reset clears every valid bit.
// Lookup is combinational. ASIDs, page keys, TLB write instructions and the
// Metal-mode bypass follow the Metal architecture; the sizes, the field
// layout and the fully associative organisation are this design's choices.
module tlb
  import metal_pkg::*;
#(
  parameter int ENTRIES = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // lookup
  input  logic                       req,        // a load or store is in the memory stage
  input  logic                       is_store,
  input  logic                       metal_mode, // bypass translation
  input  logic [XLEN-1:0]            vaddr,
  input  logic [ASID_W-1:0]          asid,
  input  logic [2*NKEYS-1:0]         pkr,
  output logic [XLEN-1:0]            paddr,
  output logic                       fault,
  // write
  input  logic                       we,
  input  logic [$clog2(ENTRIES)-1:0] widx,
  input  tlb_entry_t                 wentry
);
  tlb_entry_t tab [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) tab[i] <= '0;
    end else if (we) begin
      tab[widx] <= wentry;
    end
  end

  logic             hit;
  tlb_entry_t       he;
  logic [VPN_W-1:0] vpn;
  logic             in_range;

  assign vpn      = vaddr[VA_BITS-1:PAGE_BITS];
  assign in_range = (vaddr[XLEN-1:VA_BITS] == '0);

  always_comb begin
    hit = 1'b0;
    he  = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (!hit && tab[i].valid && tab[i].asid == asid && tab[i].vpn == vpn) begin
        hit = 1'b1;
        he  = tab[i];
      end
    end
  end

  logic ad, wd, allowed;
  assign ad      = pkr[2*he.key];
  assign wd      = pkr[2*he.key + 1];
  assign allowed = is_store ? (he.w && !ad && !wd) : (he.r && !ad);

  always_comb begin
    if (metal_mode) begin
      paddr = vaddr;
      fault = 1'b0;
    end else begin
      paddr = XLEN'({he.ppn, vaddr[PAGE_BITS-1:0]});
      fault = req && !(in_range && hit && allowed);
    end
  end
endmodule
