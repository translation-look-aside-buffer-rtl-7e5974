// tlb_pkg: types shared by the low context-switch
// penalty TLB and the earlier banked large-page TLB.
//
// The default sizes are the ones the design is evaluated with: a 128-entry
// shared TLB of 4KB pages, 16 promotion banks of 2 complete-subblock
// entries (subblock factor 4, i.e. 16KB groups), and for the earlier design
// 32 banks of 8 entries of 1MB pages; the modules carry them as parameter
// defaults. Only the types shared between modules live here.
package tlb_pkg;

  // Where a translation delivered on the response port came from.
  typedef enum logic [1:0] {
    SRC_SHARED = 2'd0,  // hit in the shared (small page) TLB
    SRC_BANK   = 2'd1,  // hit in the current promotion bank
    SRC_WALK   = 2'd2   // miss: fetched from the page-table walker
  } resp_src_e;

  // One-cycle event pulses, for performance counters and tests.
  typedef struct packed {
    logic hit_shared;   // lookup hit in the shared TLB
    logic hit_bank;     // lookup hit in the current bank
    logic miss;         // lookup missed everywhere, translation requested
    logic promote;      // a 16KB group was promoted into the current bank
    logic victim_wb;    // an evicted bank entry was written back to the shared TLB
    logic bank_reuse;   // no current bank; task tag matched a valid bank
    logic bank_alloc;   // no current bank; a victim bank was flushed and allocated
    logic ctx_switch;   // context switch performed
    logic clear;        // clear-TLB performed
  } tlb_events_t;

endpackage
