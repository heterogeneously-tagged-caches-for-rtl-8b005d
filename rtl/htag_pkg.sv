// Shared types and constants of the heterogeneously tagged data cache.
//
// The address geometry follows the evaluated configuration: 32-bit
// virtual and physical addresses, 4 KB pages (20-bit VPN and PPN), a 4-bit
// process identifier and 2 access-control bits per page or shared region.
// The access-control encoding (bit 0 read, bit 1 write) and the TLB entry
// layout are this design's own choices.
package htag_pkg;

  localparam int unsigned VA_W      = 32;
  localparam int unsigned PA_W      = 32;
  localparam int unsigned PAGE_BITS = 12;
  localparam int unsigned VPN_W     = VA_W - PAGE_BITS;
  localparam int unsigned PPN_W     = PA_W - PAGE_BITS;
  localparam int unsigned PID_W     = 4;
  localparam int unsigned AC_W      = 2;

  typedef logic [VA_W-1:0]  va_t;
  typedef logic [PA_W-1:0]  pa_t;
  typedef logic [VPN_W-1:0] vpn_t;
  typedef logic [PPN_W-1:0] ppn_t;
  typedef logic [PID_W-1:0] pid_t;
  typedef logic [AC_W-1:0]  ac_t;

  // Access-control bits
  localparam int unsigned AC_READ  = 0;
  localparam int unsigned AC_WRITE = 1;

  // Address regions of the virtual address map
  typedef enum logic [1:0] {
    REG_PRIVATE    = 2'd0,  // virtually tagged, no translation on a hit
    REG_SHARED_SOT = 2'd1,  // physically tagged, translated by the offset adders
    REG_SHARED_TLB = 2'd2   // physically tagged, translated by the TLB (OS aligned)
  } region_e;

  // One TLB entry
  typedef struct packed {
    logic valid;
    pid_t pid;
    vpn_t vpn;
    ppn_t ppn;
    ac_t  ac;
  } tlb_entry_t;

  // Outcome of a load or store
  typedef enum logic [1:0] {
    RESP_OK       = 2'd0,
    RESP_TLB_MISS = 2'd1,  // no translation: the OS must refill the TLB and retry
    RESP_AC_FAULT = 2'd2   // access-control violation or unmapped SOT region
  } resp_e;

  function automatic logic ac_allows(ac_t ac, logic is_write);
    return is_write ? ac[AC_WRITE] : ac[AC_READ];
  endfunction

endpackage
