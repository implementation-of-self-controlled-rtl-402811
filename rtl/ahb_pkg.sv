// ahb_pkg: types and constants shared by the bus matrix.
//
// The matrix carries arbitration hints inside the 32-bit address: every
// master address is split into a 3-bit slave number, a 3-bit priority level,
// a 4-bit transfer length and a 22-bit offset. The field widths follow the
// original scheme; the order (slave number in the top bits, offset in the bottom
// bits) is this implementation's choice.
//
// The transfer length field selects the data multiplexing mode:
//   0      transaction based: the master keeps the slave for one burst, its
//          length taken from HBURST (INCR counts as 1, being open-ended)
//   1      transfer based: re-arbitration after every transfer
//   2..15  desired length: the master keeps the slave for that many transfers
// The meaning of 0 is this implementation's own encoding.
package ahb_pkg;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned SNUM_W = 3;   // slave number
  localparam int unsigned PLVL_W = 3;   // priority level, 0 is highest
  localparam int unsigned TLEN_W = 4;   // transfer length
  localparam int unsigned OFFS_W = 22;  // offset address seen by the slave
  localparam int unsigned CNT_W  = 5;   // transfer counter, holds up to 16

  // HTRANS
  typedef enum logic [1:0] {
    TR_IDLE   = 2'b00,
    TR_BUSY   = 2'b01,
    TR_NONSEQ = 2'b10,
    TR_SEQ    = 2'b11
  } htrans_t;

  // HBURST
  typedef enum logic [2:0] {
    BU_SINGLE = 3'b000,
    BU_INCR   = 3'b001,
    BU_WRAP4  = 3'b010,
    BU_INCR4  = 3'b011,
    BU_WRAP8  = 3'b100,
    BU_INCR8  = 3'b101,
    BU_WRAP16 = 3'b110,
    BU_INCR16 = 3'b111
  } hburst_t;

  // Address phase of one master: everything the master drives except HWDATA.
  typedef struct packed {
    logic [ADDR_W-1:0] haddr;
    htrans_t           htrans;
    logic              hwrite;
    logic [2:0]        hsize;
    hburst_t           hburst;
    logic              hmastlock;
  } ahb_req_t;

  // The address split into its fields.
  typedef struct packed {
    logic [SNUM_W-1:0] s_number;
    logic [PLVL_W-1:0] p_level;
    logic [TLEN_W-1:0] t_length;
    logic [OFFS_W-1:0] offset_add;
  } addr_fields_t;

  // A transfer that moves data: NONSEQ or SEQ.
  function automatic logic is_active(htrans_t t);
    return t == TR_NONSEQ || t == TR_SEQ;
  endfunction

  // Beats in one burst of the given type.
  function automatic logic [CNT_W-1:0] burst_beats(hburst_t b);
    unique case (b)
      BU_WRAP4, BU_INCR4:   return CNT_W'(4);
      BU_WRAP8, BU_INCR8:   return CNT_W'(8);
      BU_WRAP16, BU_INCR16: return CNT_W'(16);
      default:              return CNT_W'(1);
    endcase
  endfunction

  // Number of transfers a master is allotted once it is granted.
  function automatic logic [CNT_W-1:0] transfer_count(logic [TLEN_W-1:0] t_length,
                                                      hburst_t hburst);
    return (t_length == '0) ? burst_beats(hburst) : CNT_W'(t_length);
  endfunction

endpackage
