// tb_esdcc_pkg: testbench helpers for the ES-DCC blocks. It builds link
// packets from sample arrays and holds a reference model of the data
// reduction, written independently of the RTL from the formulas in the
// module headers: pedestal/gain, mean of 32 strips, peak rule and
// threshold. Also a bit-serial CRC-16-CCITT and the CMS trailer CRC.
package tb_esdcc_pkg;
  import esdcc_pkg::*;

  typedef logic [11:0] samples_t [384];
  typedef logic [15:0] packet_t  [300];

  // index of a sample in packet order: micromodule, sample, strip
  function automatic int sidx(int mm, int s, int strip);
    return mm * 96 + s * 32 + strip;
  endfunction

  // bit-by-bit CRC, independent of esdcc_pkg::crc16_next
  function automatic logic [15:0] ref_crc(logic [15:0] c, logic [63:0] d, int w);
    for (int i = w - 1; i >= 0; i--) begin
      logic fb;
      fb = c[15] ^ d[i];
      c  = c << 1;
      if (fb) begin c[0] ^= 1'b1; c[5] ^= 1'b1; c[12] ^= 1'b1; end
    end
    return c;
  endfunction

  function automatic void make_packet(input int bx, input int ec, input logic [7:0] flags,
                                      ref samples_t smp, ref packet_t w);
    logic [15:0] c;
    int k;
    w[0] = {4'h5, 4'h0, flags};
    w[1] = {4'h0, 12'(bx)};
    w[2] = 16'(ec);
    for (int i = 3; i < 11; i++) w[i] = 16'(16'h7000 + i);
    k = 11;
    for (int g = 0; g < 96; g++) begin
      logic [47:0] b;
      b = {smp[4*g], smp[4*g+1], smp[4*g+2], smp[4*g+3]};
      w[k] = b[47:32]; w[k+1] = b[31:16]; w[k+2] = b[15:0];
      k += 3;
    end
    c = 16'hFFFF;
    for (int i = 0; i < 299; i++) c = ref_crc(c, 64'(w[i]), 16);
    w[299] = c;
  endfunction

  // random event: pedestal-like noise around `base`, plus a few pulses
  // peaking at sample 1, and some out-of-time pulses
  function automatic void make_event(ref samples_t smp, input int base, input int npulse);
    for (int i = 0; i < 384; i++) smp[i] = 12'(base + int'($urandom_range(0, 6)));
    for (int p = 0; p < npulse; p++) begin
      int mm, st, amp, kind;
      mm = $urandom_range(0, 3); st = $urandom_range(0, 31);
      amp = $urandom_range(60, 1500); kind = $urandom_range(0, 3);
      if (kind == 0) begin            // previous bunch: falling
        smp[sidx(mm,0,st)] = 12'(base + amp);
        smp[sidx(mm,1,st)] = 12'(base + amp/2);
        smp[sidx(mm,2,st)] = 12'(base + amp/4);
      end else if (kind == 1) begin   // next bunch: rising
        smp[sidx(mm,1,st)] = 12'(base + amp/3);
        smp[sidx(mm,2,st)] = 12'(base + amp);
      end else begin                  // in time
        smp[sidx(mm,1,st)] = 12'(base + amp);
        smp[sidx(mm,2,st)] = 12'(base + amp/2);
      end
    end
  endfunction

  typedef struct {
    int mm, strip, s0, s1, s2;
  } ref_hit_t;

  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic int floor_div(longint a, longint b);
    longint q;
    q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q -= 1;
    return int'(q);
  endfunction

  // full reduction of one link's event
  function automatic void ref_reduce(ref samples_t smp, ref int ped[128], ref int gain[128],
                                     ref int thr[128], ref ref_hit_t hits[$]);
    int v [384];
    hits.delete();
    for (int i = 0; i < 384; i++) begin
      int mm, st;
      mm = i / 96; st = i % 32;
      v[i] = sat16(longint'(floor_div(longint'(int'(smp[i]) - ped[mm*32+st]) * gain[mm*32+st], 256)));
    end
    for (int mm = 0; mm < 4; mm++)
      for (int s = 0; s < 3; s++) begin
        longint sum; int mean;
        sum = 0;
        for (int st = 0; st < 32; st++) sum += v[sidx(mm,s,st)];
        mean = floor_div(sum, 32);
        for (int st = 0; st < 32; st++) v[sidx(mm,s,st)] = sat16(longint'(v[sidx(mm,s,st)]) - mean);
      end
    for (int mm = 0; mm < 4; mm++)
      for (int st = 0; st < 32; st++) begin
        int a0, a1, a2;
        a0 = v[sidx(mm,0,st)]; a1 = v[sidx(mm,1,st)]; a2 = v[sidx(mm,2,st)];
        if (a1 > thr[mm*32+st] && a1 > a0 && a1 >= a2)
          hits.push_back('{mm, st, a0, a1, a2});
      end
  endfunction
endpackage
