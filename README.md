# Functional memories: signature-matching TCAM, 18 Mb TCAM and 3D frame buffer

SystemVerilog RTL for three memory-centred designs from K. Inoue, *Methods and
Technologies for Functional Memories with Content Addressability, Optimized
Bandwidth and Scalability*. The top, `functional_mem_top`, holds them side by
side. They share only `clk` and `rst_n`.

| Prefix | Design | Document |
|---|---|---|
| `sm_` | Signature-matching co-processor with a pipelined hierarchical TCAM | Ch. 6, 7.4, 8.3 |
| `tc_` | 18 Mb full-ternary CAM with DX pre-search, flexible width and aging | Ch. 6.4, 8.2 |
| `fb_` | 3D frame-buffer memory: pixel ALU, L1 cache, multi-bank DRAM, DUP clear | Ch. 3 |
| `flt_` | Weighted 16-sample anti-aliasing filter with pre-add multipliers | Sec. 3.2.2 |

## Signature-matching co-processor (`sigmatch_top`)

- **Key forming.** `sm_request_gen` loads the 32-bit header once per packet
  and shifts the payload in one byte per clock. It forms a 288-bit key
  `{header, last 32 bytes}` and counts the byte offset. The newest byte is
  key byte 0, so signatures are stored right-aligned.
  `cfg_hdr_bytes`/`cfg_pay_bytes` choose which bytes are compared.
- **Primary table.** `sm_tcam` holds one entry per row.
  - `tcam_store_enc` encodes stored words and `tcam_sl_gen` drives the search
    lines. Both support the conventional X/Y form and the 2-bit encoded form,
    where one of four search lines is high per digit pair (`cfg_enc`).
  - The search runs in two stages. Stage 1 compares the first 144 key bits
    and registers the match lines (ML_previous). Stage-2 search lines are
    driven only if some stage-1 line matched, and only those rows are
    evaluated. The final match is ML_previous AND ML_next.
  - `sl2_active` and `ml2_dis_cnt` report this activity.
- **Repair.** Each 256-row set has two spare rows.
  - `red_sw_remap` adds 2 to write/read addresses at or above the failed row.
  - `red_hw_shift` is a shift register, loaded by R_CK pulses after reset,
    that steers the match lines so priority order is kept.
  - The fuse contents are inputs (`fail_row`, `fail_vld`).
- **Result.** `prio_enc` gives the lowest matching entry. The result (hit,
  multi, address, offset) appears 4 clocks after its byte; one key is
  searched per clock.
- **Secondary lookup.** `sm_secondary` runs `sm_lop`: 16 header rules
  `(header & mask) op value`, four per clock. It then searches the 16 x 12-bit
  `bcam` with the primary address. The result comes 5 clocks after the
  primary hit, and a new request is taken every 4 clocks. A hit that arrives
  while the unit is busy is reported on `sec_drop`.

## 18 Mb TCAM (`tcam18_top`)

- **Organisation.** 16 banks (`tc18_bank`) of X/Y ternary rows, 72 bits wide.
  `wmode` chains 1, 2, 4 or 8 rows into a 72/144/288/576-bit entry.
- **DX pre-search.** Each bank has a 4-bit ternary DX entry (`tc18_dx`).
  Stage 1 compares it with the table ID on `srch_id`, and only matching banks
  search in stage 2. `banks_on` reports how many banks were searched.
- **Result.** Registered 3 clocks after `srch`; the lowest bank, then the
  lowest row, wins.
- **Aging (`aging_en`).** Bit 0 of every row works as follows:
  - X0 = 1 means vacant (reset value); a write clears it and an erase
    (`wr_vacant`) sets it.
  - Y0 is set by every lookup that hits the row.
  - `age_query` finds the lowest row that is occupied but was never hit.

## 3D frame buffer (`fb_top`)

- **Pixel format.** A pixel is 64 bits: Z[31:0] and A, R, G, B.
- **Pixel ALU.** `pixel_alu` reads the stored pixel from the L1 cache, runs
  `z_compare` (Z-pass when the new Z is smaller) and `a_blend`
  ((1-A)*src + A*dst through `preadd_mult`). It writes back to the same
  address seven clocks after the read.
  - Modes: one chip does both, or a Z chip drives `pass_out` into the
    `pass_in` of a colour chip.
  - A pixel whose address still has a write in flight is held.
- **L1 cache.** `fb_l1_cache` is direct-mapped with 32 lines of one 8-pixel
  block. On a miss it fills the line and writes back the dirty victim in the
  same DRAM cycle.
- **DRAM.** `fb_dram` has 4 banks with a 10,240-bit sense-amplifier page per
  bank, and a block read and a block write per cycle.
- **Clear.** `erase_start` writes row 0 of each bank, then DUP copies that
  page into all other rows, one row per clock in all banks.
- **Host reads.** `pix_wr=0` reads a pixel through the pipeline.

`msaa_filter` computes the sum of Wn*Sn over 16 samples for each of 4
channels. It uses 8 pre-add multipliers per channel, and the result is
rounded >> 8.

## Sizes

The RTL defaults match the document except for the number of rows:

| Parameter | Default | Document | Why reduced |
|---|---|---|---|
| Signature entries (`ENTRIES`, `SM_ENTRIES`) | 1024 | 4096 | The row loops at 4096 entries exceed the 4000-iteration loop limit of the yosys-slang front end. 2048 elaborates, but four times slower than 1024. |
| Rows per TCAM bank (`ROWS`, `TC_ROWS`) | 256 | 16,384 | 512 rows already exceed the loop limit. |
| Rows per DRAM bank (`ROWS`, `FB_ROWS`) | 64 | 1024 (40 Mbit) | Kept short to elaborate; bank count and page width are unchanged. |

All of these are parameters, so the document's sizes can be set for
simulation.

## Not built

- **Laser-fuse PROM of the repair scheme.** A process element; its contents
  are ports.
- **Video buffer and W-LUT.** Only named in the document.
- **Low-voltage data-transfer buffers.** Analog; their effect, concurrent
  read and write, is in `fb_dram`.
- **Transparent refresh of the DRAM-cell CAM (Sec. 5.3).** None of these
  designs uses DRAM-cell CAM storage.

Known simplifications:
- The DRAM has no refresh or row-timing model.
- Any stored-versus-new cache conflict is avoided by draining the ALU before
  a miss is served.

## Tests

`tb/` holds a self-checking testbench per block. Each prints
`TB_RESULT checks=N failures=M`, and each checks the latencies given above.

`tb_functional_mem_top` runs the top at its default parameters and makes
every mechanism happen at least once:
- signature matching: hit, multiple hit, secondary hit and drop, stage-2
  lines off, encoded lines, repaired row;
- 18 Mb TCAM: DX exclusion, 144-bit entry, aging query, vacant erase;
- frame buffer: Z-pass, Z-fail, blend, same-address hold, miss with
  write-back, DUP clear, host read;
- the filter.
