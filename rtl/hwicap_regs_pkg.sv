// hwicap_regs_pkg -- register map of the vendor HWICAP core as seen from its
// IPIF slave port, and the engine's operation codes.
//
// The engine reuses the vendor core rather than driving the ICAP itself, so
// that the low-level port timing of each family stays the vendor's concern.
// The offsets and bit meanings below are those of the HWICAP register
// interface (write FIFO, read FIFO, size, control, status, FIFO vacancy and
// occupancy); they are not printed in the design description and are recorded
// here so that a different core version only means a different package.
package hwicap_regs_pkg;

  typedef logic [8:0] ip_addr_t;

  localparam ip_addr_t HW_WF  = 9'h100;  // write FIFO keyhole
  localparam ip_addr_t HW_RF  = 9'h104;  // read FIFO keyhole
  localparam ip_addr_t HW_SZ  = 9'h108;  // number of words to read back
  localparam ip_addr_t HW_CR  = 9'h10C;  // control: bit 0 write, bit 1 read
  localparam ip_addr_t HW_SR  = 9'h110;  // status: bit 0 done (no transfer running)
  localparam ip_addr_t HW_WFV = 9'h114;  // write FIFO vacancy
  localparam ip_addr_t HW_RFO = 9'h118;  // read FIFO occupancy

  localparam logic [31:0] CR_WRITE = 32'h1;
  localparam logic [31:0] CR_READ  = 32'h2;

  // Operations of the reconfiguration engine
  typedef enum logic [1:0] {
    OP_WRITE = 2'd0,   // frames from a memory into a region (relocation, replication)
    OP_READ  = 2'd1,   // readback of a region into the output memory
    OP_COPY  = 2'd2    // readback of one region, then write of it into another
  } op_e;

endpackage
