// Shared constants and types for the PCIe / FFT test-bench design.
//
// Holds the sample format of the FFT buses (16-bit signed, real parts in the
// low half of a bus, imaginary parts in the high half), the FFT latencies of
// the two systems (13 cycles for the 16-point FFT behind the XDMA bridge,
// 19 cycles for the 32-point FFT behind the two Wupper endpoints), and the
// PCIe transaction-layer packet (TLP) header fields used by the Wupper DMA
// engine: Fmt/Type codes for memory read, memory write and completion with
// data, laid out as in the PCIe base specification (DW0 bits 31:24 Fmt/Type,
// bits 9:0 Length).
package pcie_fft_pkg;

  localparam int unsigned SAMPLE_W   = 16;   // bits per real or imaginary sample
  localparam int unsigned XDMA_BUS_W = 512;  // H2C/C2H stream width
  localparam int unsigned WUP_BUS_W  = 512;  // per-endpoint stream width
  localparam int unsigned FFT16_LAT  = 13;   // cycles, 16-point FFT
  localparam int unsigned FFT32_LAT  = 19;   // cycles, 32-point FFT

  // TLP Fmt/Type byte (DW0[31:24])
  typedef enum logic [7:0] {
    TLP_MRD32 = 8'h00,  // memory read, 3DW header
    TLP_MRD64 = 8'h20,  // memory read, 4DW header
    TLP_MWR32 = 8'h40,  // memory write, 3DW header, with data
    TLP_MWR64 = 8'h60,  // memory write, 4DW header, with data
    TLP_CPL   = 8'h0A,  // completion without data
    TLP_CPLD  = 8'h4A   // completion with data
  } tlp_fmt_type_e;

  // Completion status codes (DW1[15:13] of a completion)
  localparam logic [2:0] CPL_SC = 3'b000;  // successful completion
  localparam logic [2:0] CPL_UR = 3'b001;  // unsupported request

  // Fields of a request header, decoded
  typedef struct packed {
    tlp_fmt_type_e fmt_type;
    logic [9:0]    length;     // DW count, 0 means 1024
    logic [15:0]   req_id;
    logic [7:0]    tag;
    logic [3:0]    last_be;
    logic [3:0]    first_be;
    logic [63:0]   addr;       // byte address, bits 1:0 zero
  } tlp_req_hdr_t;

  // DW0 of any header
  function automatic logic [31:0] tlp_dw0(tlp_fmt_type_e ft, logic [9:0] len);
    return {ft, 14'h0, len};  // TC, TD, EP, Attr, AT all zero
  endfunction

  // DW1 of a request: requester ID, tag, last and first byte enables
  function automatic logic [31:0] tlp_req_dw1(logic [15:0] rid, logic [7:0] tag,
                                              logic [3:0] lbe, logic [3:0] fbe);
    return {rid, tag, lbe, fbe};
  endfunction

endpackage
