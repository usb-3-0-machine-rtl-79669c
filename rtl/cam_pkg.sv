// cam_pkg: constants and helper functions shared by the sensor-to-FX3 datapath.
//
// The sensor frames every line with a start sync code (SAV) and an end sync
// code (EAV). Each code is four words: all ones, zero, zero, and a status word.
// For a 10-bit word the status word is {1, 0, V, H, P3..P0, 0, 0} where V=1
// marks a blanking line, H=1 marks an end code, and P3..P0 are protection bits
// that depend only on V and H. These values follow the sensor's code tables
// (3FFh 000h 000h then 200h/274h for active lines, 2ACh/2D8h for blanking
// lines). A 12-bit word carries the same code shifted left by two (FFFh,
// 000h, 000h, then 800h/9D0h/AB0h/B60h). Channel words travel in 16-bit lanes,
// zero-extended, two per 32-bit word, the earlier pixel in the low lane. The
// functions below take the word width pw (10 or 12) and work on 12-bit
// containers, the width used right-aligned.
package cam_pkg;

  localparam int unsigned PIX_W_MAX = 12;        // widest sensor word (12-bit readout)

  // Protection bits P3..P0 for a given V and H (sensor code table).
  function automatic logic [3:0] sync_prot(input logic v, input logic h);
    unique case ({v, h})
      2'b00:   return 4'b0000;
      2'b01:   return 4'b1101;
      2'b10:   return 4'b1011;
      default: return 4'b0110;
    endcase
  endfunction

  // Fourth word of a sync code for a 10-bit word.
  function automatic logic [9:0] sync_word4(input logic v, input logic h);
    return {1'b1, 1'b0, v, h, sync_prot(v, h), 2'b00};
  endfunction

  // Fourth word of a sync code for a pw-bit word (pw = 10 or 12).
  function automatic logic [PIX_W_MAX-1:0] code_word4(input logic v, input logic h,
                                                       input int unsigned pw);
    return PIX_W_MAX'(sync_word4(v, h)) << (pw - 10);
  endfunction

  // True when the pw-bit word w is a valid fourth code word.
  function automatic logic is_code_word4(input logic [PIX_W_MAX-1:0] w, input int unsigned pw);
    logic [PIX_W_MAX-1:0] t;
    t = w >> (pw - 10);
    return ((t << (pw - 10)) == w) && (t[11:10] == 2'b00) && (t[9:8] == 2'b10) &&
           (t[1:0] == 2'b00) && (t[5:2] == sync_prot(t[7], t[6]));
  endfunction

  // V and H bits of a pw-bit fourth code word.
  function automatic logic code_v(input logic [PIX_W_MAX-1:0] w, input int unsigned pw);
    return w[pw - 3];
  endfunction
  function automatic logic code_h(input logic [PIX_W_MAX-1:0] w, input int unsigned pw);
    return w[pw - 4];
  endfunction

  // Header sent ahead of the first line of a frame: C0h 0Ch 55h 55h.
  localparam logic [31:0] FRAME_MARK = 32'hC00C_5555;

endpackage
