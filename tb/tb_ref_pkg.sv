// tb_ref_pkg: reference models shared by the testbenches, written
// independently of the RTL: a bit-serial CRC-16 (poly 0x1021, init 0xFFFF,
// MSB first), a literal Gray code table, and the tone frequency plan
// (tone k at 1900 + (2k-15)*100 Hz).
package tb_ref_pkg;
  localparam logic [3:0] GRAY [16] = '{4'h0, 4'h1, 4'h3, 4'h2, 4'h6, 4'h7, 4'h5, 4'h4,
                                      4'hC, 4'hD, 4'hF, 4'hE, 4'hA, 4'hB, 4'h9, 4'h8};

  function automatic int tone_of_nibble(input logic [3:0] nib);
    for (int k = 0; k < 16; k++) if (GRAY[k] == nib) return k;
    return -1;
  endfunction

  function automatic logic [15:0] crc_bits(input logic [15:0] c, input byte b);
    logic fb;
    for (int i = 7; i >= 0; i--) begin
      fb = c[15] ^ b[i];
      c = {c[14:0], 1'b0};
      if (fb) c = c ^ 16'h1021;
    end
    return c;
  endfunction

  function automatic real tone_freq(input int k);
    return 1900.0 + real'(2*k - 15) * 100.0;
  endfunction

  // Tone indices of a whole burst for the given data bytes:
  // start tones 15 and 0, data nibbles high first, then the CRC16 nibbles.
  function automatic void burst_tones(input byte data [], output int tones []);
    logic [15:0] c;
    int n;
    c = 16'hFFFF;
    foreach (data[i]) c = crc_bits(c, data[i]);
    tones = new[2 + 2*data.size() + 4];
    tones[0] = 15; tones[1] = 0;
    n = 2;
    foreach (data[i]) begin
      tones[n++] = tone_of_nibble(data[i][7:4]);
      tones[n++] = tone_of_nibble(data[i][3:0]);
    end
    for (int q = 3; q >= 0; q--) tones[n++] = tone_of_nibble(c[4*q +: 4]);
  endfunction
endpackage
