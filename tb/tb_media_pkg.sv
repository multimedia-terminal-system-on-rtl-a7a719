// Test data and stand-in "coders" shared by the system testbenches.
//
// The media samples are a fixed hash of (med, word index). The stand-in
// coders turn the input words of one frame into a 32-bit digest (XOR of the
// words, each rotated by its index) and expand it into the coded bytes:
//   audio frame k: AUDIO_BYTES bytes, byte i = digest[8*(i%4)+:8] ^ i ^ k
//   video frame k: vlen(k) = VMIN + (13*k) % VSPAN bytes,
//                  byte i = digest[8*(i%4)+:8] ^ i ^ 3k
// The core models compute them from what they read over the bus; the stream
// checker computes them straight from the sample hash, so a wrong word
// anywhere on the way shows up as a wrong byte in the MUX stream.
package tb_media_pkg;

  function automatic logic [31:0] sample(input int med, input int idx);
    logic [31:0] x;
    x = 32'(idx) * 32'h9E3779B1 ^ (32'(med) << 28) ^ 32'h1234_5678;
    x = x ^ (x >> 15);
    x = x * 32'h85EB_CA6B;
    return x ^ (x >> 13);
  endfunction

  function automatic logic [31:0] mix(input logic [31:0] acc, input logic [31:0] w, input int i);
    int r;
    r = i % 32;
    return acc ^ ((r == 0) ? w : ((w << r) | (w >> (32 - r))));
  endfunction

  function automatic logic [31:0] digest(input int med, input int frame, input int words);
    logic [31:0] acc;
    acc = '0;
    for (int i = 0; i < words; i++) acc = mix(acc, sample(med, frame * words + i), i);
    return acc;
  endfunction

  function automatic logic [7:0] coded_byte(input int med, input logic [31:0] dg, input int frame, input int i);
    return dg[8*(i%4) +: 8] ^ 8'(i) ^ 8'((med == 0) ? frame : 3 * frame);
  endfunction

  function automatic int vlen(input int frame, input int vmin, input int vspan);
    return vmin + (13 * frame) % vspan;
  endfunction

endpackage
