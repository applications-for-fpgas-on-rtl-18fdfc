// gps_pkg: types and constants shared by the GPS baseband blocks.
// The sample rate (16.384 MHz), the 16-bit NCO accumulator, the 20 replica
// carriers at 500 Hz spacing, the 32 C/A code generators and the 8 channels
// follow the design description. The intermediate frequency of the frontend
// (4.092 MHz, the MAX2769 default) and the G2 tap table (from the public GPS
// interface specification) are supplied here; the description does not list them.
package gps_pkg;

  localparam int unsigned FS_HZ       = 16_384_000; // frontend sample rate
  localparam int unsigned CHIP_HZ     = 1_023_000;  // C/A chipping rate
  localparam int unsigned IF_HZ       = 4_092_000;  // frontend IF (assumed)
  localparam int unsigned NCO_BITS    = 16;
  localparam int unsigned NUM_PRN     = 32;

  // Avalon-MM master request/response, 32-bit word bus, byte addresses.
  typedef struct packed {
    logic        read;
    logic        write;
    logic [31:0] address;
    logic [31:0] writedata;
  } avm_req_t;

  typedef struct packed {
    logic        waitrequest;
    logic        readdatavalid;
    logic [31:0] readdata;
  } avm_rsp_t;

  // Phase increment of an N-bit NCO: f * 2^N / fclk, rounded (Eq. 4.3).
  function automatic logic [NCO_BITS-1:0] nco_incr(longint f_hz, longint fclk_hz);
    longint v;
    v = (f_hz * (longint'(1) << NCO_BITS) + fclk_hz / 2) / fclk_hz;
    return v[NCO_BITS-1:0];
  endfunction

  // G2 output taps (S1, S2), 1-based stage numbers, for PRN 1..32.
  function automatic logic [7:0] g2_taps(int prn);
    case (prn)
      1: return {4'd2, 4'd6};   2: return {4'd3, 4'd7};   3: return {4'd4, 4'd8};
      4: return {4'd5, 4'd9};   5: return {4'd1, 4'd9};   6: return {4'd2, 4'd10};
      7: return {4'd1, 4'd8};   8: return {4'd2, 4'd9};   9: return {4'd3, 4'd10};
      10: return {4'd2, 4'd3};  11: return {4'd3, 4'd4};  12: return {4'd5, 4'd6};
      13: return {4'd6, 4'd7};  14: return {4'd7, 4'd8};  15: return {4'd8, 4'd9};
      16: return {4'd9, 4'd10}; 17: return {4'd1, 4'd4};  18: return {4'd2, 4'd5};
      19: return {4'd3, 4'd6};  20: return {4'd4, 4'd7};  21: return {4'd5, 4'd8};
      22: return {4'd6, 4'd9};  23: return {4'd1, 4'd3};  24: return {4'd4, 4'd6};
      25: return {4'd5, 4'd7};  26: return {4'd6, 4'd8};  27: return {4'd7, 4'd9};
      28: return {4'd8, 4'd10}; 29: return {4'd1, 4'd6};  30: return {4'd2, 4'd7};
      31: return {4'd3, 4'd8};  default: return {4'd4, 4'd9};
    endcase
  endfunction

endpackage
