// tb_ds_pkg: builds test data structures for the PCE testbenches.
//
// A memory image (word offset -> 64-bit word) is built here and copied by
// the testbench into the vault memory model.  Offsets are relative to the
// start of the direct segment: physical address PA0 + off, virtual address
// VA0 + off.  Stored pointers are virtual addresses, as the host would
// leave them.  The expected result of every search is known from how the
// structure was built, independently of the engine.
package tb_ds_pkg;
  import pce_pkg::*;

  localparam longint unsigned PA0     = 64'h0000_0001_0000_0000;
  localparam longint unsigned VA0     = 64'h0000_7f00_0000_0000;
  localparam longint unsigned SEG_LEN = 64'h0000_0000_0010_0000;  // 1 MB

  logic [63:0] img [longint unsigned];

  function automatic longint unsigned va(input longint unsigned off);
    return VA0 + off;
  endfunction

  function automatic longint unsigned pa(input longint unsigned off);
    return PA0 + off;
  endfunction

  function automatic void reset_image();
    img.delete();
  endfunction

  // singly linked list: node i at offs[i], key keys[i], next -> node i+1
  function automatic void build_list(input longint unsigned offs[$], input logic [63:0] keys[$],
                                     input int unsigned data_off, input int unsigned next_off);
    for (int i = 0; i < offs.size(); i++) begin
      img[offs[i] + data_off] = keys[i];
      img[offs[i] + next_off] = (i + 1 < offs.size()) ? va(offs[i+1]) : 64'd0;
    end
  endfunction

  // b+tree of 256-byte nodes: 15 keys at offset 0, 16 child pointers at
  // offset 128.  Leaf j holds keys key_of(15*j .. 15*j+14); unused key slots
  // hold all-ones; leaves have null children.  Nodes are allocated from
  // base_off upwards, leaves first.  Returns the root offset and the depth.
  function automatic logic [63:0] bt_key(input int unsigned j);
    return 64'(10 * (j + 1));
  endfunction

  function automatic void build_btree(input longint unsigned base_off, input int unsigned nkeys,
                                      output longint unsigned root_off, output int unsigned depth);
    longint unsigned lvl_off [$];
    logic [63:0]     lvl_min [$];
    longint unsigned nxt_off [$];
    logic [63:0]     nxt_min [$];
    longint unsigned a = base_off;
    int unsigned nleaf = (nkeys + 14) / 15;
    for (int l = 0; l < int'(nleaf); l++) begin
      for (int k = 0; k < 15; k++) begin
        int unsigned j = l * 15 + k;
        img[a + 8*k] = (j < nkeys) ? bt_key(j) : 64'hFFFF_FFFF_FFFF_FFFF;
      end
      for (int k = 0; k < 16; k++) img[a + 128 + 8*k] = 64'd0;
      lvl_off.push_back(a);
      lvl_min.push_back(bt_key(l * 15));
      a += 256;
    end
    depth = 1;
    while (lvl_off.size() > 1) begin
      nxt_off.delete();
      nxt_min.delete();
      for (int n = 0; n < lvl_off.size(); n += 16) begin
        for (int k = 0; k < 15; k++)
          img[a + 8*k] = (n + k + 1 < lvl_off.size()) ? lvl_min[n+k+1] : 64'hFFFF_FFFF_FFFF_FFFF;
        for (int k = 0; k < 16; k++)
          img[a + 128 + 8*k] = (n + k < lvl_off.size()) ? va(lvl_off[n+k]) : 64'd0;
        nxt_off.push_back(a);
        nxt_min.push_back(lvl_min[n]);
        a += 256;
      end
      lvl_off = nxt_off;
      lvl_min = nxt_min;
      depth++;
    end
    root_off = lvl_off[0];
  endfunction

  function automatic longint unsigned bt_leaf(input longint unsigned base_off, input int unsigned j);
    return base_off + 256 * (j / 15);
  endfunction

  function automatic find_t mk_find(input stype_e t, input longint unsigned base_va,
                                    input int unsigned doff, input int unsigned dsize,
                                    input int unsigned noff, input logic [63:0] gold,
                                    input int unsigned ssize, input int unsigned oplg);
    find_t f;
    f.stype       = t;
    f.base        = base_va;
    f.data_off    = 16'(doff);
    f.data_size   = 16'(dsize);
    f.next_off    = 16'(noff);
    f.gold        = gold;
    f.struct_size = 16'(ssize);
    f.op_lg       = 4'(oplg);
    return f;
  endfunction
endpackage
